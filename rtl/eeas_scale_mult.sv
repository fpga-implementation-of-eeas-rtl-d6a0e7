// eeas_scale_mult: fixed-point fractional multiplier for scale-factor
// compensation.
//
// In the extended angle set every element has its own gain
// 1/cos(atan(t)), so the total CORDIC gain depends on the sequence chosen for
// the input angle and cannot be a single constant preloaded into x as in the
// conventional algorithm. The generator therefore keeps the running product
// P = prod cos(atan(t_j)) and multiplies x and y by P at the end; this unit
// does one such product: p = round(a * b / 2^FRAC), b being an unsigned
// factor in [0, 1]. Compensating with a multiplier is this design's choice.
//
// Combinational. a_i signed, b_i unsigned, both FRAC fraction bits; p_o signed.
module eeas_scale_mult
  import eeas_pkg::*;
#(
  parameter int unsigned WI   = W_DEF + GUARD_DEF,
  parameter int unsigned FRAC = FRAC_DEF
) (
  input  logic signed [WI-1:0] a_i,
  input  logic        [WI-1:0] b_i,
  output logic signed [WI-1:0] p_o
);

  logic signed [2*WI:0] prod;
  logic signed [2*WI:0] rnd;

  assign prod = a_i * signed'({1'b0, b_i});
  assign rnd  = prod + ((2*WI+1)'(1) <<< (FRAC - 1));
  assign p_o  = WI'(rnd >>> FRAC);

endmodule
