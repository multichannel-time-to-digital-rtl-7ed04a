// tb_wu_launcher: checks the wave-union pulse. A rising hit edge must raise
// the output at once and drop it PULSE_PS later; a falling hit edge must not
// produce a pulse.
module tb_wu_launcher;
  timeunit 1ps; timeprecision 1fs;
  localparam real PW = 300.0;
  logic hit = 0, wu_out;
  real t_up, t_dn;
  int  ups = 0, downs = 0;
  int checks = 0, failures = 0;

  wu_launcher #(.PULSE_PS(PW)) dut (.hit, .wu_out);

  always @(posedge wu_out) begin t_up = $realtime; ups++; end
  always @(negedge wu_out) begin t_dn = $realtime; downs++; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t0;
    #1000;
    for (int i = 0; i < 20; i++) begin
      ups = 0; downs = 0;
      t0 = $realtime;
      hit = 1;
      #(PW / 2);
      check(wu_out == 1'b1, "output high inside the pulse");
      #(2000 + 37 * i);
      check(ups == 1 && downs == 1, "one rising and one falling transition");
      check(t_up - t0 < 0.01, "rising transition at the hit edge");
      check((t_dn - t_up) > PW - 0.01 && (t_dn - t_up) < PW + 0.01, "pulse width");
      hit = 0;
      #(2000);
      check(ups == 1 && downs == 1 && wu_out == 0, "no pulse on a falling hit edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
