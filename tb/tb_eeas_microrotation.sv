// tb_eeas_microrotation: checks one EEAS micro-rotation against the real
// valued recurrence x' = x - d*t*y, y' = y + d*t*x.
//
// Random vectors and random elements (all three term combinations, both
// directions, the zero element). Each of the two truncated shift terms may be
// off by up to one LSB, so the result must lie within 2 LSB of the exact
// value. The zero element must pass the vector unchanged.
module tb_eeas_microrotation;
  import eeas_pkg::*;

  localparam int unsigned WI     = W_DEF + GUARD_DEF;
  localparam int unsigned NSHIFT = NSHIFT_DEF;

  logic signed [WI-1:0] x, y, xo, yo;
  elem_t                elem;
  logic                 neg;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_one = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  eeas_microrotation dut (.x_i(x), .y_i(y), .elem_i(elem), .neg_i(neg), .x_o(xo), .y_o(yo));

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

  initial begin
    for (int i = 0; i < 3000; i++) begin
      real t, d, ex, ey;
      int a, b;
      x = WI'($urandom_range(0, 1 << 23)) - WI'(1 << 22);
      y = WI'($urandom_range(0, 1 << 23)) - WI'(1 << 22);
      a = $urandom_range(0, NSHIFT - 2);
      b = $urandom_range(a + 1, NSHIFT - 1);
      elem        = '0;
      elem.active = ($urandom_range(0, 9) != 0);
      elem.s0     = 5'(a);
      elem.s1     = 5'(b);
      case ($urandom_range(0, 2))
        0: elem.op1 = TERM_NONE;
        1: elem.op1 = TERM_ADD;
        default: elem.op1 = TERM_SUB;
      endcase
      neg = 1'($urandom_range(0, 1));
      #1;
      if (!elem.active) begin
        check("zero element keeps the vector", xo == x && yo == y);
        continue;
      end
      t = 2.0 ** (-a);
      case (elem.op1)
        TERM_ADD: begin t += 2.0 ** (-b); n_add++; end
        TERM_SUB: begin t -= 2.0 ** (-b); n_sub++; end
        default:  n_one++;
      endcase
      d  = neg ? -1.0 : 1.0;
      ex = real'(x) - d * t * real'(y);
      ey = real'(y) + d * t * real'(x);
      check($sformatf("x: %0d vs %f (s0=%0d s1=%0d op=%0d neg=%0d)", xo, ex, a, b, elem.op1, neg),
            rabs(real'(xo) - ex) <= 2.0);
      check($sformatf("y: %0d vs %f (s0=%0d s1=%0d op=%0d neg=%0d)", yo, ey, a, b, elem.op1, neg),
            rabs(real'(yo) - ey) <= 2.0);
    end
    check("all term combinations exercised", n_add > 0 && n_sub > 0 && n_one > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
