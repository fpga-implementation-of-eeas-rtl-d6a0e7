// tb_eeas_cordic_30deg: the 30 degree sine/cosine case, run on two instances
// of the generator, one with the default Rm = 15 iterations and one with
// Rm = 20 iterations.
//
// For each instance it checks sin(pi/6) = 0.5 and cos(pi/6) = 0.866025 to
// within 16 LSB (Q2.22), the latency of Rm+2 clock cycles from start to done,
// and that the residual angle left in the angle register is below 0.014
// degrees. It prints the residual angle and 10*log10(1/e^2) with e in
// degrees, the error measure used when comparing recoding schemes.
module tb_eeas_cordic_30deg;
  import eeas_pkg::*;

  localparam int unsigned W    = W_DEF;
  localparam int unsigned FRAC = FRAC_DEF;
  localparam real         PI   = 3.14159265358979323846;

  logic                clk = 1'b0;
  logic                reset, start;
  logic signed [W-1:0] angle;
  logic signed [W-1:0] sin15, cos15, sin20, cos20;
  logic                done15, busy15, done20, busy20;

  int checks = 0, failures = 0;

  eeas_cordic #(.RM(15)) u15 (.clk, .reset, .start, .angle,
                             .sin(sin15), .cos(cos15), .done(done15), .busy(busy15));
  eeas_cordic #(.RM(20)) u20 (.clk, .reset, .start, .angle,
                             .sin(sin20), .cos(cos20), .done(done20), .busy(busy20));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic report(string name, int rm, int lat, logic signed [W-1:0] s,
                        logic signed [W-1:0] c, real resid);
    real sr, cr, rdeg;
    sr   = real'(s) / (2.0 ** FRAC);
    cr   = real'(c) / (2.0 ** FRAC);
    rdeg = resid / (2.0 ** FRAC) * 180.0 / PI;
    $display("%s: Rm=%0d latency=%0d sin=%f cos=%f residual=%e deg", name, rm, lat, sr, cr, rdeg);
    if (rdeg != 0.0)
      $display("%s: 10*log10(1/e^2) = %f dB", name, 10.0 * $log10(1.0 / (rdeg * rdeg)));
    else
      $display("%s: residual below one LSB of the angle register", name);
    check($sformatf("%s latency %0d", name, lat), lat == rm + 2);
    check($sformatf("%s sin", name), rabs(sr - 0.5) * (2.0 ** FRAC) <= 16.0);
    check($sformatf("%s cos", name), rabs(cr - $sqrt(3.0) / 2.0) * (2.0 ** FRAC) <= 16.0);
    check($sformatf("%s residual", name), rabs(rdeg) < 0.014);
  endtask

  initial begin
    int cyc, lat15, lat20;
    real r15, r20;
    reset = 1'b1;
    start = 1'b0;
    angle = '0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    angle = W'(longint'((PI / 6.0) * (2.0 ** FRAC)));
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1; lat15 = 0; lat20 = 0;
    while (!(done15 && done20) && cyc < 100) begin
      @(negedge clk);
      cyc++;
      if (done15 && lat15 == 0) lat15 = cyc;
      if (done20 && lat20 == 0) lat20 = cyc;
    end
    r15 = real'(u15.z_q);
    r20 = real'(u20.z_q);
    report("u15", 15, lat15, sin15, cos15, r15);
    report("u20", 20, lat20, sin20, cos20, r20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
