// tb_eeas_scale_mult: checks the rounded fractional multiply
// p = round(a * b / 2^FRAC) against real arithmetic, for random signed a,
// factors b in [0, 1], and the corner cases b = 0, b = 1.0, a = 0 and
// negative a.
module tb_eeas_scale_mult;
  import eeas_pkg::*;

  localparam int unsigned WI   = W_DEF + GUARD_DEF;
  localparam int unsigned FRAC = FRAC_DEF;

  logic signed [WI-1:0] a, p;
  logic        [WI-1:0] b;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  eeas_scale_mult dut (.a_i(a), .b_i(b), .p_o(p));

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

  task automatic try_ab(logic signed [WI-1:0] av, logic [WI-1:0] bv);
    real e;
    a = av; b = bv;
    #1;
    e = $floor(real'(av) * real'(bv) / (2.0 ** FRAC) + 0.5);
    check($sformatf("%0d * %0d = %0d, expected %f", av, bv, p, e), real'(p) == e);
  endtask

  initial begin
    try_ab(WI'(1 << FRAC), WI'(1 << FRAC));
    try_ab(-WI'(1 << FRAC), WI'(1 << FRAC));
    try_ab(WI'(12345), '0);
    try_ab('0, WI'(777777));
    try_ab(-WI'(3 << FRAC), WI'(2547003));
    for (int i = 0; i < 2000; i++) begin
      logic signed [WI-1:0] av;
      logic        [WI-1:0] bv;
      av = WI'($urandom_range(0, (1 << (FRAC + 3)) - 1)) - WI'(1 << (FRAC + 2));
      bv = WI'($urandom_range(0, 1 << FRAC));
      try_ab(av, bv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
