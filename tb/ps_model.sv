// ps_model: behavioural model of the processing system that drives the TDC.
//
// Testbench only. It stands for the ARM core and its clock: it generates the
// code-density test clock (asynchronous to the sampling clock), is the
// AXI4-Lite master of the TDC's register interface and runs the automatic
// calibration software:
//   1. switch all channels to the code-density clock, clear, collect hits;
//   2. read each channel's raw histogram;
//   3. compute the weighted-histogram factors: with cumulative actual bin
//      edges Tact[k] and ideal edges Tideal[n] = n*Q (Q = mean bin width),
//      actual bin k overlaps ideal bins n0..n1; they become Addr L/M/R[k]
//      with Coe = overlap / W[k] (8 fraction bits); the edge ideal bins of a
//      bin that covers more than three are handed to its neighbours;
//   4. write the factors into each channel's calibration BRAM.
// Tasks are called hierarchically by the testbench.
module ps_model #(
  parameter int  N_CH      = 16,
  parameter real CD_HALF_PS = 6172.839
) (
  input  logic        clk,
  output logic        cd_clk,
  output logic [7:0]  awaddr,
  output logic        awvalid,
  input  logic        awready,
  output logic [31:0] wdata,
  output logic        wvalid,
  input  logic        wready,
  input  logic        bvalid,
  output logic        bready,
  output logic [7:0]  araddr,
  output logic        arvalid,
  input  logic        arready,
  input  logic [31:0] rdata,
  input  logic        rvalid,
  output logic        rready
);
  timeunit 1ps; timeprecision 1fs;
  localparam int DEPTH = 512;

  bit  cd_run = 0;
  real hist_l [DEPTH], hist_m [DEPTH], hist_r [DEPTH];  // last read, in hits
  int  n_ideal;                                         // ideal bins of last calibration
  int  axi_writes = 0, axi_reads = 0, cal_words = 0;
  int  case_a = 0, case_b = 0, case_c = 0;            // bins mapped to 1, 2, 3 ideal bins

  initial begin
    cd_clk = 0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; wdata = 0; araddr = 0;
  end
  always begin
    #(CD_HALF_PS);
    cd_clk = cd_run ? ~cd_clk : 1'b0;
  end

  task automatic axi_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wvalid = 1; bready = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk); bready = 0;
    axi_writes++;
  endtask

  task automatic axi_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk); rready = 0;
    axi_reads++;
  endtask

  task automatic select(input int ch, input bit cd_mode);
    axi_write(8'h00, 32'(ch) | (32'(cd_mode) << 8));
  endtask

  task automatic clear_hist(input int ch, input bit cd_mode);
    logic [31:0] st;
    select(ch, cd_mode);
    axi_write(8'h04, 32'd1);
    do axi_read(8'h08, st); while (st[0]);
  endtask

  task automatic write_factors(input int k, input int al, input int am, input int ar,
                               input int cl, input int cm, input int cr);
    axi_write(8'h0C, 32'(k));
    axi_write(8'h10, (32'(al) << 18) | (32'(am) << 9) | 32'(ar));
    axi_write(8'h14, (32'(cl) << 18) | (32'(cm) << 9) | 32'(cr));
    cal_words++;
  endtask

  // Identity table: every fine code counts 1.0 into its own L bin.
  task automatic load_identity(input int ch, input bit cd_mode);
    select(ch, cd_mode);
    for (int k = 0; k < DEPTH; k++) write_factors(k, k, 0, 0, 256, 0, 0);
  endtask

  task automatic read_bin(input int k, output real l, output real m, output real r);
    logic [31:0] st, d;
    axi_write(8'h18, 32'(k));
    do axi_read(8'h08, st); while (!st[1]);
    axi_read(8'h1C, d); l = real'(d) / 256.0;
    axi_read(8'h20, d); m = real'(d) / 256.0;
    axi_read(8'h24, d); r = real'(d) / 256.0;
  endtask

  task automatic read_hist(input int ch, input bit cd_mode, input int n);
    select(ch, cd_mode);
    for (int k = 0; k < DEPTH; k++) begin
      hist_l[k] = 0; hist_m[k] = 0; hist_r[k] = 0;
    end
    for (int k = 0; k < n; k++) read_bin(k, hist_l[k], hist_m[k], hist_r[k]);
  endtask

  // Weighted-histogram factors from the raw histogram in hist_l.
  // Pass 1: actual bin k covers ideal bins n0..n1 (up to 5 for bins below
  // 4 LSB), each with the overlapping fraction of W[k].
  // Pass 2: a bin covering more than three ideal bins keeps three; an ideal bin
  // it gives up at its low (high) end is filled by its neighbour k-1 (k+1):
  // the neighbour's weight for that ideal bin is raised if it already maps
  // there, or it takes the bin as its Addr R (Addr L) if it has a pair to
  // spare, with the weight that restores the missing width.
  task automatic calibrate(input int ch, input bit cd_mode);
    real h [DEPTH];
    int  pa [DEPTH][5];
    real pc [DEPTH][5];
    int  pn [DEPTH];
    real total, q, lo, hi, ov;
    int  nz, n0, n1, first;
    total = 0; nz = 0;
    for (int k = 0; k < DEPTH; k++) begin
      h[k] = hist_l[k];
      total += h[k];
      if (h[k] > 0) nz++;
      pn[k] = 0;
    end
    n_ideal = nz;
    q  = total / real'(nz);
    lo = 0;
    for (int k = 0; k < DEPTH; k++)
      if (h[k] > 0) begin
        hi = lo + h[k];
        n0 = int'($floor(lo / q));
        n1 = int'($ceil(hi / q)) - 1;
        if (n1 < n0) n1 = n0;
        if (n1 > nz - 1) n1 = nz - 1;
        for (int n = n0; n <= n1 && pn[k] < 5; n++) begin
          ov = ((hi < (n + 1) * q) ? hi : (n + 1) * q) - ((lo > n * q) ? lo : n * q);
          if (ov > 0) begin pa[k][pn[k]] = n; pc[k][pn[k]] = ov / h[k]; pn[k]++; end
        end
        lo = hi;
      end
    for (int k = 0; k < DEPTH; k++)
      while (pn[k] > 3) begin
        // give up the smaller end
        if (pc[k][0] <= pc[k][pn[k] - 1]) begin
          if (k > 0 && pn[k-1] > 0 && pa[k-1][pn[k-1] - 1] == pa[k][0]) begin
            pc[k-1][pn[k-1] - 1] += pc[k][0] * h[k] / h[k-1];
          end else if (k > 0 && pn[k-1] > 0 && pn[k-1] < 3 && pa[k-1][pn[k-1] - 1] == pa[k][0] - 1) begin
            pa[k-1][pn[k-1]] = pa[k][0];
            pc[k-1][pn[k-1]] = pc[k][0] * h[k] / h[k-1];
            pn[k-1]++;
          end
          for (int i = 0; i < 4; i++) begin pa[k][i] = pa[k][i+1]; pc[k][i] = pc[k][i+1]; end
        end else if (k < DEPTH - 1 && pn[k+1] > 0 && pa[k+1][0] == pa[k][pn[k] - 1]) begin
          pc[k+1][0] += pc[k][pn[k] - 1] * h[k] / h[k+1];
        end else if (k < DEPTH - 1 && pn[k+1] > 0 && pn[k+1] < 3 && pa[k+1][0] == pa[k][pn[k] - 1] + 1) begin
          for (int i = 2; i > 0; i--) begin pa[k+1][i] = pa[k+1][i-1]; pc[k+1][i] = pc[k+1][i-1]; end
          pa[k+1][0] = pa[k][pn[k] - 1];
          pc[k+1][0] = pc[k][pn[k] - 1] * h[k] / h[k+1];
          pn[k+1]++;
        end
        pn[k]--;
      end
    select(ch, cd_mode);
    for (int k = 0; k < DEPTH; k++) begin
      int ad [3], co [3];
      ad = '{0, 0, 0}; co = '{0, 0, 0};
      for (int i = 0; i < pn[k]; i++) begin
        ad[i] = pa[k][i];
        co[i] = int'(pc[k][i] * 256.0 + 0.5);
        if (co[i] > 511) co[i] = 511;
      end
      if (pn[k] == 3) case_c++; else if (pn[k] == 2) case_b++; else if (pn[k] == 1) case_a++;
      write_factors(k, ad[0], ad[1], ad[2], co[0], co[1], co[2]);
    end
  endtask

  // Peak-to-peak DNL (LSB) of n bins of the last read histogram (L+M+R).
  function automatic real dnl_pkpk(input int first, input int n);
    real s, mean, d, dmin, dmax;
    s = 0;
    for (int k = first; k < first + n; k++) s += hist_l[k] + hist_m[k] + hist_r[k];
    mean = s / real'(n);
    dmin = 1e9; dmax = -1e9;
    for (int k = first; k < first + n; k++) begin
      d = (hist_l[k] + hist_m[k] + hist_r[k]) / mean - 1.0;
      if (d < dmin) dmin = d;
      if (d > dmax) dmax = d;
    end
    return dmax - dmin;
  endfunction

  // Peak-to-peak INL (LSB) of the same bins.
  function automatic real inl_pkpk(input int first, input int n);
    real s, mean, acc, imin, imax;
    s = 0;
    for (int k = first; k < first + n; k++) s += hist_l[k] + hist_m[k] + hist_r[k];
    mean = s / real'(n);
    acc = 0; imin = 1e9; imax = -1e9;
    for (int k = first; k < first + n; k++) begin
      acc += (hist_l[k] + hist_m[k] + hist_r[k]) / mean - 1.0;
      if (acc < imin) imin = acc;
      if (acc > imax) imax = acc;
    end
    return imax - imin;
  endfunction
endmodule
