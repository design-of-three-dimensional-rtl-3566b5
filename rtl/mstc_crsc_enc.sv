// mstc_crsc_enc: 8-state duobinary circular recursive systematic
// convolutional (CRSC) encoder of one slice.
//
// Each slice of M symbols is encoded on its own with a tail-biting
// (circular) trellis, so the encoder ends in the state it started from. This
// takes two passes over the slice:
//   1. `clear`, then M `en` cycles from state 0: the state reached is S0.
//   2. `load_circ`: the state becomes the circulation state Sc, the solution
//      of Sc = G^M*Sc xor S0 (G = zero-input state transition), then M `en`
//      cycles again, during which `y` is the parity bit of the symbol (a,b).
// The trellis (feedback 1+D+D^3 with B also entering the 2nd and 3rd cells,
// parity 1+D^2+D^3 seen from the feedback node) is defined in mstc_pkg; the
// source only specifies a duobinary 8-state rate-2/3 circular code.
// `y` is combinational from the present state and (a,b); the state updates
// on the clock edge of an `en` cycle.
module mstc_crsc_enc
  import mstc_pkg::*;
#(
  parameter int unsigned M = 256               // symbols per slice, not a multiple of 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,                    // state <= 0
  input  logic       load_circ,                // state <= circulation state of present state
  input  logic       en,                       // consume symbol (a,b)
  input  logic       a,
  input  logic       b,
  output logic       y,                        // parity of (a,b) from the present state
  output logic [2:0] state
);
  logic [2:0] circ;

  // Circulation state: the candidate c with c xor G^M c == present state.
  always_comb begin
    circ = '0;
    for (int unsigned c = 0; c < NSTATE; c++)
      if ((3'(c) ^ zero_run(3'(c), M)) == state) circ = 3'(c);
  end

  assign y = trellis_par(state, a, b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= '0;
    else if (clear)     state <= '0;
    else if (load_circ) state <= circ;
    else if (en)        state <= trellis_next(state, a, b);
  end

  initial assert (M % 7 != 0) else $error("M must not be a multiple of 7 for a circular code");
endmodule
