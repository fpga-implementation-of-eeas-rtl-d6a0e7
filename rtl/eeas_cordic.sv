// eeas_cordic: iterative CORDIC sine/cosine generator using the extended
// elementary angle set (EEAS), the top of the design.
//
// A rotation-mode CORDIC turns the vector (1, 0) by the input angle; the end
// point is (cos, sin). Instead of the conventional sequence of angles
// atan(2^-i), each micro-rotation here uses atan(t) with t made of up to two
// signed powers of two, picked afresh from the whole extended set for the
// residual angle, and the number of micro-rotations is fixed at Rm for every
// input. This lets a small Rm reach a small residual angle.
//
// Datapath (one micro-rotation per clock, registers X, Y, Z loaded through
// their input multiplexers, as in the classic iterative CORDIC):
//   Z  residual angle; eeas_recoder picks the element and direction, and
//      Z <= Z - delta
//   X, Y  rotated by eeas_microrotation (two shifters per cross term)
//   P  running product of the per-step factors cos(atan(t)), by eeas_scale_mult
// After Rm steps one more cycle multiplies X and Y by P, giving cos and sin
// without the CORDIC gain. X starts at 1.0 (not 1/K): the gain is removed at
// the end because it depends on the chosen sequence.
//
// Interface
//   clk, reset      clock; synchronous active-high reset
//   start           request; accepted when not busy
//   angle[W-1:0]    radians, two's complement, FRAC fraction bits (Q2.22 by
//                   default: range about +/-2 rad); sampled with start
//   sin, cos        results in the same format, valid while done is high
//   done            high from the end of a computation to the next start
//   busy            computation in progress
// Timing: done rises Rm+2 clock edges after the edge that accepted start
// (17 cycles with the defaults) and the result stays until the next start.
//
// Internal words carry GUARD extra integer bits so the un-normalised vector
// (gain up to about 2 for the first steps) cannot overflow.
module eeas_cordic
  import eeas_pkg::*;
#(
  parameter int unsigned W      = W_DEF,
  parameter int unsigned FRAC   = FRAC_DEF,
  parameter int unsigned NSHIFT = NSHIFT_DEF,
  parameter int unsigned RM     = RM_DEF,
  parameter int unsigned GUARD  = GUARD_DEF
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                start,
  input  logic signed [W-1:0] angle,
  output logic signed [W-1:0] sin,
  output logic signed [W-1:0] cos,
  output logic                done,
  output logic                busy
);

  localparam int unsigned WI = W + GUARD;
  localparam logic signed [WI-1:0] ONE = WI'(1) <<< FRAC;

  logic                      load, rotate, scale;
  logic [$clog2(RM+1)-1:0]   iter;

  eeas_ctrl #(.RM(RM)) u_ctrl (
    .clk, .reset, .start,
    .load_o(load), .rotate_o(rotate), .scale_o(scale),
    .iter_o(iter), .busy_o(busy), .done_o(done)
  );

  logic signed [WI-1:0] x_q, y_q, z_q;
  logic        [WI-1:0] p_q;

  // Angle recoding on the residual
  elem_t                elem;
  logic                 neg;
  logic signed [WI-1:0] delta;
  logic        [WI-1:0] cosf;

  eeas_recoder #(.WI(WI), .FRAC(FRAC), .NSHIFT(NSHIFT)) u_rec (
    .z_i(z_q), .elem_o(elem), .neg_o(neg), .delta_o(delta), .cosf_o(cosf)
  );

  // Micro-rotation of the vector
  logic signed [WI-1:0] x_rot, y_rot;

  eeas_microrotation #(.WI(WI)) u_rot (
    .x_i(x_q), .y_i(y_q), .elem_i(elem), .neg_i(neg),
    .x_o(x_rot), .y_o(y_rot)
  );

  // Scale-factor product (during rotation) and compensation (at the end).
  // The P product and the X product share one multiplier, the Y product uses
  // the second.
  logic signed [WI-1:0] m0_a, m0_p, m1_p;
  logic        [WI-1:0] m0_b;

  assign m0_a = scale ? x_q : signed'(p_q);
  assign m0_b = scale ? p_q : cosf;

  eeas_scale_mult #(.WI(WI), .FRAC(FRAC)) u_mul0 (.a_i(m0_a), .b_i(m0_b), .p_o(m0_p));
  eeas_scale_mult #(.WI(WI), .FRAC(FRAC)) u_mul1 (.a_i(y_q),  .b_i(p_q),  .p_o(m1_p));

  always_ff @(posedge clk) begin
    if (reset) begin
      x_q <= '0;
      y_q <= '0;
      z_q <= '0;
      p_q <= '0;
    end else if (load) begin
      x_q <= ONE;
      y_q <= '0;
      z_q <= WI'(angle);          // sign-extended
      p_q <= ONE;
    end else if (rotate) begin
      x_q <= x_rot;
      y_q <= y_rot;
      z_q <= z_q - delta;
      p_q <= m0_p;
    end else if (scale) begin
      x_q <= m0_p;
      y_q <= m1_p;
    end
  end

  assign cos = x_q[W-1:0];
  assign sin = y_q[W-1:0];

  // Compensation follows the last of exactly RM micro-rotations.
  a_full_sequence: assert property (@(posedge clk) disable iff (reset)
    scale |-> $past(rotate) && ($past(iter) == ($bits(iter))'(RM - 1)));

  // After compensation the results are within [-1, 1] (plus rounding), so
  // dropping the guard bits loses nothing.
  a_result_fits: assert property (@(posedge clk) disable iff (reset)
    done |-> (x_q[WI-1:W-1] == {(GUARD+1){x_q[W-1]}}) &&
             (y_q[WI-1:W-1] == {(GUARD+1){y_q[W-1]}}));

endmodule
