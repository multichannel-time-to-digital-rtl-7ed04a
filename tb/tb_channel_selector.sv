// tb_channel_selector: for every channel selection and random strobes and
// channel data, checks that strobes reach only the selected channel and that
// the selected channel's read-out data and status come back.
module tb_channel_selector;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  localparam int N = 16;
  logic [3:0]   sel;
  logic         cal_we, rd_req, clr, rd_valid, clr_busy;
  hist_rd_t     rd_data;
  logic [N-1:0] ch_cal_we, ch_rd_req, ch_clr, ch_rd_valid, ch_clr_busy;
  hist_rd_t     ch_rd_data [N];
  int checks = 0, failures = 0;

  channel_selector #(.N_CH(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      sel = (i < N) ? 4'(i) : 4'($urandom);
      {cal_we, rd_req, clr} = 3'($urandom);
      ch_rd_valid = N'($urandom);
      ch_clr_busy = N'($urandom);
      for (int c = 0; c < N; c++) ch_rd_data[c] = hist_rd_t'({$urandom, $urandom, $urandom});
      #10;
      checks += 4;
      if (ch_cal_we !== (N'(cal_we) << sel) || ch_rd_req !== (N'(rd_req) << sel) ||
          ch_clr !== (N'(clr) << sel)) begin
        failures++; $display("FAIL strobes sel=%0d", sel);
      end
      if (rd_valid !== ch_rd_valid[sel]) begin failures++; $display("FAIL rd_valid"); end
      if (rd_data !== ch_rd_data[sel]) begin failures++; $display("FAIL rd_data"); end
      if (clr_busy !== ch_clr_busy[sel]) begin failures++; $display("FAIL clr_busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
