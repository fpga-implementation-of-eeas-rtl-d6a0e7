// eeas_recoder: angle recoding step of the EEAS CORDIC (the "d_i control" and
// "look up table" of the iterative CORDIC datapath, extended to two signed
// powers of two per micro-rotation).
//
// Given the residual angle z, it selects the element of the extended
// elementary angle set whose angle atan(t) lies closest to |z|, and the
// rotation direction (towards z). Choosing greedily, iteration by iteration,
// is this design's way of solving the recoding problem "minimise the residual
// angle with at most Rm micro-rotations"; the search method itself is not
// prescribed by the algorithm. Because the zero element is in the set, the
// residual magnitude never grows.
//
// Purely combinational: the whole set (num_elems(NSHIFT) entries, 485 for
// NSHIFT = 22) is compared in parallel and the first entry with the smallest
// error wins. Tables are constants computed at elaboration.
//
// Ports
//   z_i      residual angle, radians, signed, FRAC fraction bits
//   elem_o   chosen element (shifts and term combination)
//   neg_o    1: rotate clockwise (z < 0), 0: counter-clockwise
//   delta_o  signed angle actually rotated, +/- atan(t); z_next = z - delta
//   cosf_o   cos(atan(t)) of the chosen element, FRAC fraction bits, for the
//            scale-factor product
module eeas_recoder
  import eeas_pkg::*;
#(
  parameter int unsigned WI     = W_DEF + GUARD_DEF,
  parameter int unsigned FRAC   = FRAC_DEF,
  parameter int unsigned NSHIFT = NSHIFT_DEF
) (
  input  logic signed [WI-1:0] z_i,
  output elem_t                elem_o,
  output logic                 neg_o,
  output logic signed [WI-1:0] delta_o,
  output logic        [WI-1:0] cosf_o
);

  localparam int unsigned NE = num_elems(NSHIFT);

  typedef logic [WI-1:0] word_t;

  function automatic word_t angle_of(int unsigned k);
    return word_t'(elem_angle_q(elem_of(k, NSHIFT), FRAC));
  endfunction

  function automatic word_t cos_of(int unsigned k);
    return word_t'(elem_cos_q(elem_of(k, NSHIFT), FRAC));
  endfunction

  // Constant tables, one entry per element.
  word_t ANGLE [NE];
  word_t COSF  [NE];
  elem_t ELEM  [NE];
  for (genvar k = 0; k < NE; k++) begin : g_tab
    assign ANGLE[k] = angle_of(k);
    assign COSF[k]  = cos_of(k);
    assign ELEM[k]  = elem_of(k, NSHIFT);
  end

  logic [WI-1:0] mag;
  assign mag   = z_i[WI-1] ? word_t'(-z_i) : word_t'(z_i);
  assign neg_o = z_i[WI-1];

  logic [WI-1:0] best_err;
  logic [$clog2(NE)-1:0] best_k;

  always_comb begin
    logic [WI-1:0] err;
    best_err = mag;            // the zero element
    best_k   = 0;
    for (int unsigned k = 1; k < NE; k++) begin
      err = (mag >= ANGLE[k]) ? (mag - ANGLE[k]) : (ANGLE[k] - mag);
      if (err < best_err) begin
        best_err = err;
        best_k   = ($clog2(NE))'(k);
      end
    end
  end

  assign elem_o  = ELEM[best_k];
  assign cosf_o  = COSF[best_k];
  assign delta_o = neg_o ? -signed'(ANGLE[best_k]) : signed'(ANGLE[best_k]);

endmodule
