// eeas_ctrl: sequencing state machine and iteration counter of the EEAS
// CORDIC sine/cosine generator.
//
// The algorithm fixes the number of micro-rotations to Rm for every angle, so
// the controller is a plain counter-driven sequence:
//   IDLE   wait for start; load_o is asserted in the cycle start is accepted,
//          so the x/y/z registers take their initial values at that edge
//   ROTATE RM cycles, iter_o = 0 .. RM-1; rotate_o asserted, one
//          micro-rotation per clock
//   SCALE  one cycle; scale_o asserted, x and y are multiplied by the
//          accumulated scale factor
//   DONE   done_o held high until the next start is accepted
// A start seen in DONE begins a new computation at once. busy_o is high in
// ROTATE and SCALE; start is ignored while busy. So done_o rises RM+2 clock
// edges after the edge that accepted start.
//
// reset is synchronous and active high (the polarity and style are this
// design's choice).
module eeas_ctrl
  import eeas_pkg::*;
#(
  parameter int unsigned RM = RM_DEF
) (
  input  logic                      clk,
  input  logic                      reset,
  input  logic                      start,
  output logic                      load_o,
  output logic                      rotate_o,
  output logic                      scale_o,
  output logic [$clog2(RM+1)-1:0]   iter_o,
  output logic                      busy_o,
  output logic                      done_o
);

  typedef enum logic [1:0] {S_IDLE, S_ROTATE, S_SCALE, S_DONE} state_e;

  state_e                    state;
  logic [$clog2(RM+1)-1:0]   iter;

  assign load_o   = start && (state == S_IDLE || state == S_DONE);
  assign rotate_o = (state == S_ROTATE);
  assign scale_o  = (state == S_SCALE);
  assign busy_o   = rotate_o || scale_o;
  assign done_o   = (state == S_DONE);
  assign iter_o   = iter;

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_IDLE;
      iter  <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          state <= S_ROTATE;
          iter  <= '0;
        end
        S_ROTATE: begin
          if (iter == ($clog2(RM+1))'(RM - 1)) state <= S_SCALE;
          iter <= iter + 1'b1;
        end
        S_SCALE: state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The iteration counter never runs past the last micro-rotation.
  a_iter_range: assert property (@(posedge clk) disable iff (reset)
    rotate_o |-> iter < ($clog2(RM+1))'(RM));

endmodule
