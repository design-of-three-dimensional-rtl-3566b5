// mstc_puncturer: parity puncturing of the 3D-MSTC.
//
// The three dimensions produce parity bits y1, y2, y3 for each symbol. For
// the frame index j of a parity bit, the periodic patterns P1, P2, P3 of
// period h decide whether it is sent (1) or dropped (0). For h a power of
// two (h >= 4), P1 drops position 0, P2 drops position h/2 and P3 keeps only
// positions 0 and h/2, so that exactly one parity bit of every three is
// dropped and the code rate is 1/2; the weak third dimension carries only
// 2/h of its parity. h = 3 gives the regular code, h = 1 the 2D code.
// This block works on P parity bits of one dimension at a time, those of
// frame indices M*r + t for r = 0..P-1, and returns the keep mask. The
// period is a run-time input (1, 3 or a power of two up to 128), so one
// build offers all code variants; the evaluated configuration uses h = 32.
// Combinational.
module mstc_puncturer
  import mstc_pkg::*;
#(
  parameter int unsigned M = 256,
  parameter int unsigned P = 8
) (
  input  logic [7:0]           h,              // puncturing period
  input  logic [1:0]           dim,            // 0..2 = y1..y3
  input  logic [$clog2(M)-1:0] t,
  output logic [P-1:0]         keep
);
  always_comb
    for (int unsigned r = 0; r < P; r++)
      keep[r] = punct_keep(dim, h, 16'(M * r) + 16'(t));

endmodule
