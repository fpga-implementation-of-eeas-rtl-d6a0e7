// tb_eeas_ctrl: checks the controller's sequence and cycle counts.
//
// After start is accepted (load_o in that cycle) there must be exactly RM
// rotate cycles with iter_o = 0, 1, .., RM-1 in order, then one scale cycle,
// then done held until the next start; busy covers rotate and scale; start is
// ignored while busy; a start while done restarts at once; reset returns to
// idle from the middle of a run.
module tb_eeas_ctrl;
  import eeas_pkg::*;

  localparam int unsigned RM = RM_DEF;

  logic clk = 1'b0;
  logic reset, start;
  logic load, rotate, scale, busy, done;
  logic [$clog2(RM+1)-1:0] iter;

  int checks = 0, failures = 0;

  eeas_ctrl dut (.clk, .reset, .start, .load_o(load), .rotate_o(rotate),
                 .scale_o(scale), .iter_o(iter), .busy_o(busy), .done_o(done));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  // One run; start is raised at a negedge and the sequence is observed at the
  // following negedges. 'poke' raises start again in the middle of the run.
  task automatic run(bit poke);
    int rot;
    start = 1'b1;
    #1;
    check("load in the cycle start is accepted", load);
    @(negedge clk);
    start = 1'b0;
    rot = 0;
    while (rotate) begin
      check($sformatf("iteration index %0d, expected %0d", iter, rot), int'(iter) == rot);
      check("busy while rotating", busy && !done && !scale);
      if (poke && rot == 3) begin
        start = 1'b1;
        #1;
        check("start ignored while busy", !load);
      end
      @(negedge clk);
      start = 1'b0;
      rot++;
      if (rot > RM + 5) break;
    end
    check($sformatf("%0d rotate cycles, expected %0d", rot, RM), rot == RM);
    check("scale cycle follows", scale && busy && !done);
    @(negedge clk);
    check("done after scale", done && !busy && !scale && !rotate);
    repeat (3) @(negedge clk);
    check("done held", done);
  endtask

  initial begin
    reset = 1'b1;
    start = 1'b0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    check("idle after reset", !busy && !done && !rotate && !scale);
    repeat (2) @(negedge clk);
    check("no start, stays idle", !busy && !done);
    run(1'b0);
    run(1'b1);          // started from DONE: back to back
    run(1'b0);
    // reset in the middle
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (5) @(negedge clk);
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    check("reset aborts", !busy && !done && !rotate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
