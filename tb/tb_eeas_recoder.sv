// tb_eeas_recoder: checks the greedy angle recoding step against a
// real-valued search of the extended elementary angle set done in the
// testbench itself.
//
// For each residual angle z (corner cases, tiny values and random values over
// the +/-2 rad range) the testbench enumerates every tangent
// 2^-a, 2^-a + 2^-b, 2^-a - 2^-b (a < b < NSHIFT) and 0, finds the smallest
// achievable | |z| - atan(t) |, and checks that the recoder's choice:
//   - reaches that minimum (within one LSB of table rounding),
//   - reports delta = sign(z) * atan(t) of the element it names,
//   - gives the direction of z and cos(atan(t)) of the element.
module tb_eeas_recoder;
  import eeas_pkg::*;

  localparam int unsigned WI     = W_DEF + GUARD_DEF;
  localparam int unsigned FRAC   = FRAC_DEF;
  localparam int unsigned NSHIFT = NSHIFT_DEF;
  localparam real         LSB    = 1.0 / (2.0 ** FRAC);

  logic signed [WI-1:0] z;
  elem_t                elem;
  logic                 neg;
  logic signed [WI-1:0] delta;
  logic        [WI-1:0] cosf;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  eeas_recoder dut (.z_i(z), .elem_o(elem), .neg_o(neg), .delta_o(delta), .cosf_o(cosf));

  initial begin
    repeat (100000) @(posedge clk);
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

  // Smallest achievable error over the whole set, in radians.
  function automatic real best_error(real mag);
    real best, t;
    best = mag;
    for (int a = 0; a < NSHIFT; a++) begin
      t = 2.0 ** (-a);
      if (rabs(mag - $atan(t)) < best) best = rabs(mag - $atan(t));
      for (int b = a + 1; b < NSHIFT; b++) begin
        t = 2.0 ** (-a) + 2.0 ** (-b);
        if (rabs(mag - $atan(t)) < best) best = rabs(mag - $atan(t));
        t = 2.0 ** (-a) - 2.0 ** (-b);
        if (rabs(mag - $atan(t)) < best) best = rabs(mag - $atan(t));
      end
    end
    return best;
  endfunction

  // Tangent named by the element fields
  function automatic real tan_of(elem_t e);
    real t, p0, p1;
    int  a, b;
    if (!e.active) return 0.0;
    a  = int'(e.s0);
    b  = int'(e.s1);
    p0 = 2.0 ** (-a);
    p1 = 2.0 ** (-b);
    t  = p0;
    if (e.op1 == TERM_ADD) t = t + p1;
    if (e.op1 == TERM_SUB) t = t - p1;
    return t;
  endfunction

  task automatic try_z(logic signed [WI-1:0] v);
    real zr, mag, t, got_err, ang, dr;
    z = v;
    #1;
    zr  = real'(v) * LSB;
    mag = rabs(zr);
    t   = tan_of(elem);
    ang = $atan(t);
    dr  = real'(delta) * LSB;
    got_err = rabs(mag - ang);
    check($sformatf("z=%0d: error %e above best %e", v, got_err, best_error(mag)),
          got_err <= best_error(mag) + 1.5 * LSB);
    check($sformatf("z=%0d: delta %e vs atan %e", v, dr, ang),
          rabs(rabs(dr) - ang) <= 1.0 * LSB);
    if (elem.active) begin
      check($sformatf("z=%0d: direction", v), neg == (v < 0) && ((dr < 0.0) == (v < 0)));
      check($sformatf("z=%0d: s0 < s1 for two terms", v),
            elem.op1 == TERM_NONE || elem.s0 < elem.s1);
    end else begin
      check($sformatf("z=%0d: zero element has zero delta (%0d %h)", v, delta, elem), delta == 0);
    end
    check($sformatf("z=%0d: cos factor", v),
          rabs(real'(cosf) * LSB - 1.0 / $sqrt(1.0 + t * t)) <= 1.0 * LSB);
  endtask

  initial begin
    try_z('0);
    try_z(WI'(1));
    try_z(-WI'(1));
    try_z(WI'(3));
    try_z(WI'(longint'(0.7853981633974483 * 2.0 ** FRAC)));   // pi/4: one 45 degree step
    try_z(WI'(longint'(0.9827937232473290 * 2.0 ** FRAC)));   // atan(1.5), the largest element
    try_z(WI'(longint'(2.0 * 2.0 ** FRAC)));
    try_z(-WI'(longint'(2.0 * 2.0 ** FRAC)));
    for (int i = 0; i < 150; i++) begin
      logic signed [WI-1:0] r;
      r = WI'($urandom_range(0, 1 << (FRAC + 1)));
      if ($urandom_range(0, 1) == 1) r = -r;
      try_z(r);
    end
    for (int i = 0; i < 100; i++) begin
      logic signed [WI-1:0] r;
      r = WI'($urandom_range(0, 1 << $urandom_range(0, 16)));
      if ($urandom_range(0, 1) == 1) r = -r;
      try_z(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
