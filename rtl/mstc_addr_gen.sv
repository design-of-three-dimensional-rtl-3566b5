// mstc_addr_gen: interleaver address generator of the multiple slice turbo code.
//
// For temporal index t of the code dimension `dim`, all P slices read the
// same address PiT(t) of their memory banks, and slice r takes its symbol
// from bank (A(t mod P) + r) mod P. This block returns PiT(t) and the rotation
// A(t mod P):
//   dim 0 (natural order):  PiT(t) = t,                          A = 0
//   dim 1, dim 2:           PiT(t) = (alpha*t + beta(t mod 4)) mod M, A = rot[t mod P]
// It also returns the intersymbol permutation flag: the two bits of a
// symbol are exchanged at even indices in dimension 1 and at odd indices in
// dimension 2 (M is even, so the parity of the frame index M*r+t is that of t).
// The formulas are those of the published interleaver; alpha, beta and the
// rotation table are run-time inputs, so one generator serves both
// interleaved dimensions and any frame configuration.
// Purely combinational; t may be presented in any order.
module mstc_addr_gen
  import mstc_pkg::*;
#(
  parameter int unsigned M = 256,              // symbols per slice
  parameter int unsigned P = 8                 // slices
) (
  input  logic [1:0]           dim,
  input  logic [$clog2(M)-1:0] t,
  input  ilv_cfg_t             cfg1,           // dimension 1 interleaver
  input  ilv_cfg_t             cfg2,           // dimension 2 interleaver
  output logic [$clog2(M)-1:0] addr,           // PiT(t)
  output logic [$clog2(P)-1:0] rot,            // A(t mod P)
  output logic                 swap            // exchange A and B
);
  localparam int unsigned AW = $clog2(M);
  localparam int unsigned PW = $clog2(P);

  ilv_cfg_t cfg;
  logic [AW+CFGW:0] prod;

  always_comb begin
    cfg  = (dim == 2'd2) ? cfg2 : cfg1;
    prod = (AW+CFGW+1)'(cfg.alpha) * (AW+CFGW+1)'(t) + (AW+CFGW+1)'(cfg.beta[t[1:0]]);
    if (dim == 2'd0) begin
      addr = t;
      rot  = '0;
      swap = 1'b0;
    end else begin
      addr = AW'(prod % (AW+CFGW+1)'(M));
      rot  = PW'(cfg.rot[int'(t) % P]);
      swap = (dim == 2'd1) ? ~t[0] : t[0];
    end
  end

  initial begin
    assert (M % 4 == 0) else $error("M must be a multiple of 4");
    assert (P <= MAXP) else $error("P exceeds MAXP");
  end
endmodule
