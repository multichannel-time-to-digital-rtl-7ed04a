// tb_histogram_bram: accumulates a random stream of weighted hits, many of
// them back to back on the same few bins so that the write-forwarding path is
// used, while read-out requests arrive and must wait for the busy port. After
// the stream the bins are read out and compared with a reference histogram;
// then a clear is started and the bins must read zero. Checks the clear
// sweep's length (one bin per clock) and that every read-out is answered.
module tb_histogram_bram;
  timeunit 1ps; timeprecision 1fs;
  localparam int DEPTH = 64;
  logic        clk = 0, rst_n = 0;
  logic        acc_valid = 0, fwd, rd_req = 0, rd_valid, clr = 0, clr_busy;
  logic [5:0]  acc_addr = 0, rd_addr = 0;
  logic [8:0]  acc_inc = 0;
  logic [31:0] rd_data;
  longint      ref_h [DEPTH];
  int checks = 0, failures = 0, fwd_cnt = 0, stall_cnt = 0, busy_cycles = 0;

  histogram_bram #(.DEPTH(DEPTH)) dut (.*);
  always #5000 clk = ~clk;
  always @(posedge clk) begin
    if (fwd) fwd_cnt++;
    if (dut.rd_pend && acc_valid) stall_cnt++;
  end

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_bin(input int a, output logic [31:0] d);
    int n = 0;
    @(negedge clk); rd_req = 1; rd_addr = 6'(a);
    @(negedge clk); rd_req = 0;
    while (!rd_valid && n < 1000) begin @(negedge clk); n++; end
    checks++;
    if (!rd_valid) begin failures++; $display("FAIL read-out of bin %0d not answered", a); end
    d = rd_data;
  endtask

  initial begin
    logic [31:0] d;
    int pending_reads = 0;
    for (int k = 0; k < DEPTH; k++) ref_h[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // clear after reset takes DEPTH clocks
    while (clr_busy) begin @(negedge clk); busy_cycles++; end
    checks++;
    if (busy_cycles < DEPTH - 1 || busy_cycles > DEPTH + 1) begin
      failures++; $display("FAIL clear took %0d clocks", busy_cycles);
    end
    // random weighted stream with read-outs mixed in
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      acc_valid = ($urandom % 5) != 0;
      acc_addr  = (i % 3 == 0) ? 6'($urandom % 4) : 6'($urandom);
      acc_inc   = 9'($urandom % 257);
      if (acc_valid) ref_h[acc_addr] += acc_inc;
      rd_req = 0;
      if (i % 97 == 5 && !dut.rd_pend) begin rd_req = 1; rd_addr = 6'($urandom); pending_reads++; end
      if (rd_valid) pending_reads--;
    end
    @(negedge clk); acc_valid = 0; rd_req = 0;
    repeat (4) begin @(negedge clk); if (rd_valid) pending_reads--; end
    checks++;
    if (pending_reads != 0) begin failures++; $display("FAIL %0d read-outs unanswered", pending_reads); end
    for (int k = 0; k < DEPTH; k++) begin
      read_bin(k, d);
      checks++;
      if (d !== 32'(ref_h[k])) begin
        failures++; $display("FAIL bin %0d = %0d expected %0d", k, d, ref_h[k]);
      end
    end
    // clear, accumulate during the sweep (dropped), then read zeros
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0; acc_valid = 1; acc_addr = 3; acc_inc = 100;
    @(negedge clk); acc_valid = 0;
    busy_cycles = 0;
    while (clr_busy) begin @(negedge clk); busy_cycles++; end
    for (int k = 0; k < DEPTH; k += 3) begin
      read_bin(k, d);
      checks++;
      if (d !== 0) begin failures++; $display("FAIL bin %0d = %0d after clear", k, d); end
    end
    checks += 2;
    if (fwd_cnt == 0)   begin failures++; $display("FAIL forwarding never used"); end
    if (stall_cnt == 0) begin failures++; $display("FAIL read-out never waited"); end
    $display("forwarded %0d, read-out stalls %0d", fwd_cnt, stall_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
