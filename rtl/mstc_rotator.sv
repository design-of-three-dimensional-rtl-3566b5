// mstc_rotator: the shuffle network between the P memory banks and the P
// slice processors, a barrel shifter.
//
// Forward direction (INVERSE = 0): out[r] = in[(amt + r) mod P], so slice r
// receives the word of bank (A + r) mod P, as the spatial permutation
// requires. Inverse direction (INVERSE = 1): out[b] = in[(b - amt) mod P],
// which returns slice results to the banks they came from. Built as log2(P)
// stages of fixed rotations. Combinational.
module mstc_rotator #(
  parameter int unsigned P = 8,                // lanes (any value >= 2)
  parameter int unsigned W = 8,                // bits per lane
  parameter bit          INVERSE = 1'b0
) (
  input  logic [$clog2(P)-1:0] amt,
  input  logic [P-1:0][W-1:0]  din,
  output logic [P-1:0][W-1:0]  dout
);
  localparam int unsigned PW = $clog2(P);

  logic [PW:0][P-1:0][W-1:0] stage;

  assign stage[0] = din;
  for (genvar s = 0; s < PW; s++) begin : g_stage
    for (genvar r = 0; r < P; r++) begin : g_lane
      localparam int unsigned SRC = INVERSE ? (r + P - ((1 << s) % P)) % P : (r + (1 << s)) % P;
      assign stage[s+1][r] = amt[s] ? stage[s][SRC] : stage[s][r];
    end
  end
  assign dout = stage[PW];
endmodule
