// eeas_microrotation: one EEAS micro-rotation of the vector (x, y).
//
// With t = 2^-s0 + op * 2^-s1 taken from the selected element and d = +1
// (counter-clockwise) or -1 (clockwise):
//   x' = x - d * t * y
//   y' = y + d * t * x
// t * v is formed with two arithmetic right shifts and one add/subtract, so
// the step uses only shifters and adders, as in the iterative CORDIC datapath
// (a second shifter per cross term is what the extended angle set adds). The
// zero element leaves the vector unchanged. The vector is not normalised here;
// the gain 1/cos(atan(t)) of each step is removed later by the scaler.
//
// Combinational. x_i, y_i, x_o, y_o are signed fixed point with the same
// scaling; shifted bits below the LSB are truncated (rounded towards minus
// infinity).
module eeas_microrotation
  import eeas_pkg::*;
#(
  parameter int unsigned WI = W_DEF + GUARD_DEF
) (
  input  logic signed [WI-1:0] x_i,
  input  logic signed [WI-1:0] y_i,
  input  elem_t                elem_i,
  input  logic                 neg_i,
  output logic signed [WI-1:0] x_o,
  output logic signed [WI-1:0] y_o
);

  // t * v using the element's shifts
  function automatic logic signed [WI-1:0] tmul(logic signed [WI-1:0] v, elem_t e);
    logic signed [WI-1:0] a, b;
    a = v >>> e.s0;
    b = v >>> e.s1;
    case (e.op1)
      TERM_ADD: return a + b;
      TERM_SUB: return a - b;
      default:  return a;
    endcase
  endfunction

  logic signed [WI-1:0] ty, tx;
  assign ty = tmul(y_i, elem_i);
  assign tx = tmul(x_i, elem_i);

  always_comb begin
    if (!elem_i.active) begin
      x_o = x_i;
      y_o = y_i;
    end else if (!neg_i) begin
      x_o = x_i - ty;
      y_o = y_i + tx;
    end else begin
      x_o = x_i + ty;
      y_o = y_i - tx;
    end
  end

endmodule
