// tb_eeas_cordic: end-to-end test of the EEAS CORDIC sine/cosine generator at
// its default sizes (24-bit words, 22 fraction bits, Rm = 15).
//
// Drives a set of angles (the 30 degree case, +/-90 degrees, zero, the format
// limits and random angles), waits for done and compares sin/cos with the
// real-valued $sin/$cos of the same fixed-point angle. It also checks:
//   - latency: done rises exactly RM+2 clock edges after start is accepted
//   - busy while computing, results held while done
//   - residual angle after Rm micro-rotations for 30 degrees, against the
//     0.014 degree quantisation error quoted for Rm = 15
//   - back-to-back operation (start issued in the cycle done is seen)
// and counts how often each recoding mechanism occurred: skipped iterations
// (zero element), single-term elements, two-term sums, two-term differences,
// clockwise and counter-clockwise rotations. A mechanism that never occurs is
// a failure.
module tb_eeas_cordic;
  import eeas_pkg::*;

  localparam int unsigned W    = W_DEF;
  localparam int unsigned FRAC = FRAC_DEF;
  localparam int unsigned RM   = RM_DEF;
  localparam real         PI   = 3.14159265358979323846;
  localparam int          TOL  = 64;       // LSBs allowed on sin/cos

  logic                clk = 1'b0;
  logic                reset;
  logic                start;
  logic signed [W-1:0] angle;
  logic signed [W-1:0] sin, cos;
  logic                done, busy;

  int checks = 0, failures = 0;
  int n_skip = 0, n_single = 0, n_add = 0, n_sub = 0, n_cw = 0, n_ccw = 0;
  int max_err = 0;

  eeas_cordic dut (.clk, .reset, .start, .angle, .sin, .cos, .done, .busy);

  always #5 clk = ~clk;

  // Watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism coverage, sampled on every micro-rotation
  always @(posedge clk) begin
    if (!reset && dut.rotate) begin
      if (!dut.elem.active) n_skip++;
      else begin
        case (dut.elem.op1)
          TERM_NONE: n_single++;
          TERM_ADD:  n_add++;
          TERM_SUB:  n_sub++;
          default: ;
        endcase
        if (dut.neg) n_cw++; else n_ccw++;
      end
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // Run one angle and compare with the real-valued reference.
  task automatic run_angle(logic signed [W-1:0] a, bit back_to_back = 1'b0);
    real th, es, ec;
    int  cyc, ds, dc;
    th = real'(a) / (2.0 ** FRAC);
    if (!back_to_back) @(negedge clk);
    angle = a;
    start = 1'b1;
    @(posedge clk);            // start accepted at this edge
    @(negedge clk);
    start = 1'b0;
    angle = $urandom();        // must not matter after acceptance
    cyc = 1;
    check($sformatf("busy after start, angle %0d", a), busy && !done);
    while (!done) begin
      @(posedge clk);
      @(negedge clk);
      cyc++;
      if (cyc > 100) break;
    end
    check($sformatf("latency %0d != %0d", cyc, RM + 2), cyc == RM + 2);
    es = $sin(th) * (2.0 ** FRAC);
    ec = $cos(th) * (2.0 ** FRAC);
    ds = iabs(int'(sin) - int'(es));
    dc = iabs(int'(cos) - int'(ec));
    if (ds > max_err) max_err = ds;
    if (dc > max_err) max_err = dc;
    check($sformatf("sin(%f) = %0d exp %f", th, sin, es), ds <= TOL);
    check($sformatf("cos(%f) = %0d exp %f", th, cos, ec), dc <= TOL);
    // results hold while idle
    @(negedge clk);
    check("result held", done && sin == dut.sin && !busy);
  endtask

  logic signed [W-1:0] a30;
  real resid_deg;

  initial begin
    reset = 1'b1;
    start = 1'b0;
    angle = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    check("idle after reset", !done && !busy);

    // 30 degrees, and the residual angle left after Rm micro-rotations
    a30 = W'(longint'((PI / 6.0) * (2.0 ** FRAC)));
    run_angle(a30);
    resid_deg = real'(dut.z_q) / (2.0 ** FRAC) * 180.0 / PI;
    $display("30 deg: sin=%f cos=%f residual=%e deg",
             real'(sin) / (2.0 ** FRAC), real'(cos) / (2.0 ** FRAC), resid_deg);
    check("30 deg residual below 0.014 deg", resid_deg < 0.014 && resid_deg > -0.014);

    run_angle('0);
    run_angle(W'(longint'((PI / 2.0) * (2.0 ** FRAC))));
    run_angle(-W'(longint'((PI / 2.0) * (2.0 ** FRAC))));
    run_angle(W'(longint'((PI / 4.0) * (2.0 ** FRAC))));
    run_angle({1'b0, {(W-1){1'b1}}});      // largest positive angle
    run_angle({1'b1, {(W-1){1'b0}}});      // most negative angle

    // Random angles over the whole input range, some back to back
    for (int i = 0; i < 300; i++) begin
      logic signed [W-1:0] r;
      r = W'($urandom());
      run_angle(r, (i % 3 == 0));
    end

    // Reset in the middle of a computation
    @(negedge clk);
    angle = a30; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (4) @(negedge clk);
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    check("reset aborts computation", !busy && !done);

    $display("max error %0d LSB; skip=%0d single=%0d add=%0d sub=%0d cw=%0d ccw=%0d",
             max_err, n_skip, n_single, n_add, n_sub, n_cw, n_ccw);
    check("mechanism: skipped iteration", n_skip > 0);
    check("mechanism: single-term element", n_single > 0);
    check("mechanism: two-term sum element", n_add > 0);
    check("mechanism: two-term difference element", n_sub > 0);
    check("mechanism: clockwise rotation", n_cw > 0);
    check("mechanism: counter-clockwise rotation", n_ccw > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
