// histogram_bram: one histogram block RAM with its accumulating adder.
//
// Each accumulate request adds a width factor `acc_inc` to the bin at
// `acc_addr` (read-modify-write). Timing: the bin is read in the clock of the
// request and written back one clock later, so a request is finished two
// clocks after it is presented, and one request can be taken every clock.
// When a request hits the bin written in the previous clock, the value being
// written is forwarded instead of the stale RAM output (`fwd` pulses).
// The read port is shared with a read-out port for the processor: a read-out
// request (`rd_req`, one clock) waits while accumulations use the port and is
// answered with `rd_valid` and `rd_data` one clock after it is served.
// `clr` (and leaving reset) starts a sweep that writes zero to every bin, one
// bin per clock; accumulate requests are dropped while `clr_busy`. The
// accumulating adder follows the published design; the pipelining, the
// forwarding, the shared read port and the clear sweep are this design's.
module histogram_bram #(
  parameter int DEPTH = tdc_pkg::HIST_DEPTH,
  parameter int AW    = $clog2(DEPTH),
  parameter int DW    = tdc_pkg::HIST_W,
  parameter int IW    = tdc_pkg::COE_W
) (
  input  logic          clk,
  input  logic          rst_n,
  // accumulation
  input  logic          acc_valid,
  input  logic [AW-1:0] acc_addr,
  input  logic [IW-1:0] acc_inc,
  output logic          fwd,        // forwarding used this clock
  // processor read-out
  input  logic          rd_req,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_valid,
  output logic [DW-1:0] rd_data,
  // clear
  input  logic          clr,
  output logic          clr_busy
);
  timeunit 1ps; timeprecision 1fs;
  logic [DW-1:0] mem [DEPTH];
  logic [DW-1:0] q;

  // stage 1 (write-back) registers
  logic          s1_acc, s1_rd;
  logic [AW-1:0] s1_addr;
  logic [IW-1:0] s1_inc;
  // last write, for forwarding
  logic          w_valid;
  logic [AW-1:0] w_addr;
  logic [DW-1:0] w_data;
  // pending read-out
  logic          rd_pend;
  logic [AW-1:0] rd_pend_addr;
  // clear sweep
  logic [AW-1:0] clr_addr;

  logic          take_acc, take_rd;
  logic [AW-1:0] port_addr;
  logic [DW-1:0] base, sum;

  always_comb begin
    take_acc  = acc_valid && !clr_busy;
    take_rd   = rd_pend && !take_acc && !clr_busy;
    port_addr = take_acc ? acc_addr : rd_pend_addr;
    fwd       = s1_acc && w_valid && (w_addr == s1_addr);
    base      = fwd ? w_data : q;
    sum       = base + DW'(s1_inc);
  end

  // RAM: one read port, one write port
  always_ff @(posedge clk) begin
    if (take_acc || take_rd) q <= mem[port_addr];
    if (clr_busy)    mem[clr_addr] <= '0;
    else if (s1_acc) mem[s1_addr]  <= sum;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1_acc   <= 1'b0;
      s1_rd    <= 1'b0;
      s1_addr  <= '0;
      s1_inc   <= '0;
      w_valid  <= 1'b0;
      w_addr   <= '0;
      w_data   <= '0;
      rd_pend  <= 1'b0;
      rd_pend_addr <= '0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
      clr_busy <= 1'b1;  // clear the RAM after reset
      clr_addr <= '0;
    end else begin
      s1_acc  <= take_acc;
      s1_rd   <= take_rd;
      s1_addr <= port_addr;
      s1_inc  <= acc_inc;
      w_valid <= s1_acc && !clr_busy;
      w_addr  <= s1_addr;
      w_data  <= sum;

      if (rd_req) begin
        rd_pend      <= 1'b1;
        rd_pend_addr <= rd_addr;
      end else if (take_rd) begin
        rd_pend <= 1'b0;
      end

      rd_valid <= s1_rd;
      if (s1_rd) rd_data <= (w_valid && w_addr == s1_addr) ? w_data : q;

      if (clr_busy) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == AW'(DEPTH - 1)) clr_busy <= 1'b0;
      end else if (clr) begin
        clr_busy <= 1'b1;
        clr_addr <= '0;
      end
    end

  // A read-out request must not arrive while one is still pending.
  a_one_read: assert property (@(posedge clk) disable iff (!rst_n)
                               rd_req |-> !rd_pend || take_rd);
endmodule
