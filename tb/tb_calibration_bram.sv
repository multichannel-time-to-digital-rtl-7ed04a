// tb_calibration_bram: writes random factor words to random addresses and
// reads them back, checking the one-clock read latency and write/read
// independence against a reference array.
module tb_calibration_bram;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [8:0] wr_addr = 0, rd_addr = 0;
  cal_word_t  wr_data, rd_data;
  cal_word_t  ref_mem [512];
  bit         written [512];
  int checks = 0, failures = 0;

  calibration_bram dut (.*);
  always #5000 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cal_word_t expv;
    wr_data = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wr_en   = $urandom % 2;
      wr_addr = 9'($urandom);
      wr_data = cal_word_t'({$urandom, $urandom});
      rd_en   = 1;
      rd_addr = (i % 4 == 0) ? wr_addr : 9'($urandom);
      expv    = ref_mem[rd_addr];
      if (written[rd_addr]) begin
        @(posedge clk); #1;
        checks++;
        if (rd_data !== expv) begin
          failures++; $display("FAIL addr %0d", rd_addr);
        end
      end else @(posedge clk);
      if (wr_en) begin ref_mem[wr_addr] = wr_data; written[wr_addr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
