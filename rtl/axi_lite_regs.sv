// axi_lite_regs: AXI4-Lite register interface between the processor and the
// TDC channels.
//
// 32-bit AXI4-Lite slave. A write is taken when address and data are both
// valid and no response is outstanding; the response follows one clock later.
// A read answers one clock after its address is taken. Responses are always
// OKAY. Register map (byte addresses):
//   0x00 CTRL      rw  [7:0] channel select, [8] code-density mode
//   0x04 CMD       wo  [0] 1 = clear the selected channel's histograms
//   0x08 STATUS    ro  [0] clear busy, [1] read-out data valid
//   0x0C CAL_ADDR  rw  [8:0] fine code whose factors are written next
//   0x10 CAL_ADDRS rw  [26:18] Addr L, [17:9] Addr M, [8:0] Addr R
//   0x14 CAL_COES  rw  [26:18] Coe L, [17:9] Coe M, [8:0] Coe R;
//                      writing it stores CAL_ADDRS/CAL_COES at CAL_ADDR
//   0x18 HIST_ADDR rw  [8:0] writing it reads that bin of the selected channel
//   0x1C HIST_L    ro  L-bank value of the bin read
//   0x20 HIST_M    ro  M-bank value
//   0x24 HIST_R    ro  R-bank value
// The published design uses an AXI bus for calibration control, factors and
// histogram data; the register map and the AXI4-Lite subset are this design's.
module axi_lite_regs #(
  parameter int AW = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite slave
  input  logic [AW-1:0]      s_awaddr,
  input  logic               s_awvalid,
  output logic               s_awready,
  input  logic [31:0]        s_wdata,
  input  logic               s_wvalid,
  output logic               s_wready,
  output logic [1:0]         s_bresp,
  output logic               s_bvalid,
  input  logic               s_bready,
  input  logic [AW-1:0]      s_araddr,
  input  logic               s_arvalid,
  output logic               s_arready,
  output logic [31:0]        s_rdata,
  output logic [1:0]         s_rresp,
  output logic               s_rvalid,
  input  logic               s_rready,
  // towards the channel selector
  output logic [7:0]         ch_sel,
  output logic               cd_mode,
  output logic               clr,
  input  logic               clr_busy,
  output logic               cal_we,
  output tdc_pkg::fine_t     cal_addr,
  output tdc_pkg::cal_word_t cal_data,
  output logic               rd_req,
  output tdc_pkg::fine_t     rd_addr,
  input  logic               rd_valid,
  input  tdc_pkg::hist_rd_t  rd_data
);
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  typedef enum logic [AW-1:0] {
    R_CTRL = 'h00, R_CMD = 'h04, R_STATUS = 'h08, R_CAL_ADDR = 'h0C,
    R_CAL_ADDRS = 'h10, R_CAL_COES = 'h14, R_HIST_ADDR = 'h18,
    R_HIST_L = 'h1C, R_HIST_M = 'h20, R_HIST_R = 'h24
  } reg_e;

  logic [26:0] addrs_q, coes_q;
  hist_rd_t    hist_q;
  logic        hist_ok;
  logic        wr_fire, rd_fire;
  logic [31:0] rd_word;

  assign wr_fire   = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_fire;
  assign s_wready  = wr_fire;
  assign s_bresp   = 2'b00;
  assign rd_fire   = s_arvalid && !s_rvalid;
  assign s_arready = rd_fire;
  assign s_rresp   = 2'b00;

  assign cal_data = '{addr_l: addrs_q[26:18], addr_m: addrs_q[17:9], addr_r: addrs_q[8:0],
                      coe_l:  coes_q[26:18],  coe_m:  coes_q[17:9],  coe_r:  coes_q[8:0]};

  always_comb
    case (s_araddr)
      R_CTRL:      rd_word = {23'd0, cd_mode, ch_sel};
      R_STATUS:    rd_word = {30'd0, hist_ok, clr_busy};
      R_CAL_ADDR:  rd_word = 32'(cal_addr);
      R_CAL_ADDRS: rd_word = {5'd0, addrs_q};
      R_CAL_COES:  rd_word = {5'd0, coes_q};
      R_HIST_ADDR: rd_word = 32'(rd_addr);
      R_HIST_L:    rd_word = hist_q.l;
      R_HIST_M:    rd_word = hist_q.m;
      R_HIST_R:    rd_word = hist_q.r;
      default:     rd_word = '0;
    endcase

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      ch_sel   <= '0;
      cd_mode  <= 1'b0;
      clr      <= 1'b0;
      cal_we   <= 1'b0;
      cal_addr <= '0;
      addrs_q  <= '0;
      coes_q   <= '0;
      rd_req   <= 1'b0;
      rd_addr  <= '0;
      hist_q   <= '0;
      hist_ok  <= 1'b0;
    end else begin
      clr    <= 1'b0;
      cal_we <= 1'b0;
      rd_req <= 1'b0;

      if (wr_fire) begin
        s_bvalid <= 1'b1;
        case (s_awaddr)
          R_CTRL:      {cd_mode, ch_sel} <= s_wdata[8:0];
          R_CMD:       clr <= s_wdata[0];
          R_CAL_ADDR:  cal_addr <= s_wdata[FINE_W-1:0];
          R_CAL_ADDRS: addrs_q <= s_wdata[26:0];
          R_CAL_COES:  begin coes_q <= s_wdata[26:0]; cal_we <= 1'b1; end
          R_HIST_ADDR: begin rd_addr <= s_wdata[FINE_W-1:0]; rd_req <= 1'b1; hist_ok <= 1'b0; end
          default: ;
        endcase
      end else if (s_bready) begin
        s_bvalid <= 1'b0;
      end

      if (rd_fire) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd_word;
      end else if (s_rready) begin
        s_rvalid <= 1'b0;
      end

      if (rd_valid) begin
        hist_q  <= rd_data;
        hist_ok <= 1'b1;
      end
    end

  // AXI rule: a response stays valid until it is accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
