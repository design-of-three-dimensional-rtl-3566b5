// mstc_pkg: shared definitions of the three-dimensional multiple slice turbo
// code (3D-MSTC) encoder and decoder.
//
// A frame of N = M*P duobinary symbols (two bits A,B each) is cut into P
// slices of M symbols in each of three code dimensions. Dimension 0 reads the
// frame in natural order; dimensions 1 and 2 read it through an interleaver
// made of a temporal permutation PiT(t) = alpha*t + beta(t mod 4) mod M,
// common to all slices, and a spatial permutation that is a rotation of the
// P slices by A(t mod P). Those formulas, the (A,B) swap rule, the puncturing
// construction and the hybrid scaling schedule follow the published scheme.
// The numeric interleaver parameters, the trellis of the constituent code,
// the fixed-point widths and the scaling values of dimensions 1 and 2 are
// this design's own choices; the defaults below are examples.
package mstc_pkg;

  // Upper bounds of the run-time interleaver configuration.
  localparam int unsigned MAXP = 16;           // largest supported number of slices
  localparam int unsigned CFGW = 16;           // width of alpha and beta fields

  // Fixed-point widths of the decoder.
  localparam int unsigned W_CH  = 6;           // channel LLR (signed)
  localparam int unsigned W_EXT = 8;           // extrinsic value (signed)
  localparam int unsigned W_SM  = 14;          // state metric (signed)
  localparam int unsigned W_SF  = 5;           // scaling factor, unsigned Q4 (16 = 1.0)

  localparam int unsigned NSTATE = 8;          // 8-state duobinary trellis
  localparam int unsigned NDIM   = 3;          // three code dimensions

  // Interleaver parameters of one interleaved dimension (eq. PiT and A above).
  typedef struct packed {
    logic [CFGW-1:0]            alpha;         // must be odd (prime to M)
    logic [3:0][CFGW-1:0]       beta;          // multiples of 4
    logic [MAXP-1:0][3:0]       rot;           // A(0..P-1), a bijection of 0..P-1
  } ilv_cfg_t;

  // Example configuration for M = 256, P = 8 (irregular rotations).
  localparam ilv_cfg_t DEF_ILV1 = '{
    alpha: 16'd45,
    beta:  {16'd12, 16'd20, 16'd8, 16'd0},
    rot:   {32'h0, 4'd4, 4'd2, 4'd7, 4'd5, 4'd1, 4'd6, 4'd3, 4'd0}
  };
  localparam ilv_cfg_t DEF_ILV2 = '{
    alpha: 16'd91,
    beta:  {16'd28, 16'd4, 16'd16, 16'd0},
    rot:   {32'h0, 4'd2, 4'd4, 4'd7, 4'd3, 4'd6, 4'd1, 4'd5, 4'd0}
  };

  // Channel values of one symbol as stored in the systematic memory.
  typedef struct packed {
    logic signed [W_CH-1:0] la;               // LLR of bit A (positive: 1)
    logic signed [W_CH-1:0] lb;               // LLR of bit B
  } sys_llr_t;

  // Extrinsic information of one duobinary symbol: log ratios of the symbol
  // values 01, 10, 11 (index = {A,B}) against 00.
  typedef logic signed [W_EXT-1:0] ext_val_t;
  typedef ext_val_t [2:0] ext_t;

  // State metrics of the 8 trellis states.
  typedef logic signed [W_SM-1:0] sm_t;
  typedef sm_t [NSTATE-1:0] smv_t;

  // ---------------------------------------------------------------------
  // Constituent code: 8-state duobinary CRSC. State s = {s3,s2,s1}.
  //   s1' = s1^s3^A^B, s2' = s1^B, s3' = s2^B, parity Y = A^B^s1^s2.
  // ---------------------------------------------------------------------
  function automatic logic [2:0] trellis_next(input logic [2:0] s, input logic a, input logic b);
    logic [2:0] n;
    n[0] = s[0] ^ s[2] ^ a ^ b;
    n[1] = s[0] ^ b;
    n[2] = s[1] ^ b;
    return n;
  endfunction

  function automatic logic trellis_par(input logic [2:0] s, input logic a, input logic b);
    return a ^ b ^ s[0] ^ s[1];
  endfunction

  // State reached from s after k steps with zero input.
  function automatic logic [2:0] zero_run(input logic [2:0] s, input int unsigned k);
    logic [2:0] r;
    r = s;
    for (int unsigned i = 0; i < k % 7; i++) r = trellis_next(r, 1'b0, 1'b0);
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // Puncturing patterns of period h (1 = keep). dim 0..2 = y1..y3.
  // h = 1: 2D code (y3 removed). h = 3: regular 3D code.
  // h power of two >= 4: P1 drops position 0, P2 drops position h/2,
  // P3 keeps exactly positions 0 and h/2, so one parity bit per symbol is dropped.
  // h is a run-time value: 1, 3 or a power of two up to 128.
  // ---------------------------------------------------------------------
  function automatic logic punct_keep(input logic [1:0] dim, input logic [7:0] h, input logic [15:0] j);
    logic [7:0] p;
    if (h == 8'd1) return (dim != 2'd2);
    if (h == 8'd3) return (16'(j % 16'd3) != 16'(dim));
    p = 8'(j) & (h - 8'd1);
    case (dim)
      2'd0:    return (p != 8'd0);
      2'd1:    return (p != (h >> 1));
      default: return (p == 8'd0) || (p == (h >> 1));
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // Extrinsic scaling factors (Q4) for iteration it of nit, dimension dim.
  // Dimensions 0 and 1 grow from 0.7 to 1.0 over the iterations. In the
  // hybrid schedule the weak dimension 2 is 0 (not decoded) in the first
  // half, then grows from 0.2 to 1.0; in the plain schedule it follows
  // dimensions 0 and 1.
  // ---------------------------------------------------------------------
  function automatic logic [W_SF-1:0] scale_q4(input int unsigned dim, input int unsigned it,
                                                 input int unsigned nit, input logic hybrid);
    int unsigned first3, n3, num;
    if (dim == 2 && hybrid) begin
      first3 = nit / 2;
      if (it < first3) return '0;
      n3 = nit - first3;
      // 0.2 .. 1.0 in n3 equal steps: (0.2 + 0.8*(it-first3)/(n3-1)) * 16
      if (n3 <= 1) return W_SF'(16);
      num = 16 * (n3 - 1) + 64 * (it - first3);
      return W_SF'((2 * num + 5 * (n3 - 1)) / (10 * (n3 - 1)));
    end
    if (nit <= 1) return W_SF'(16);
    // 0.7 .. 1.0 : (11.2 + 4.8*it/(nit-1)), rounded
    num = 112 * (nit - 1) + 48 * it;
    return W_SF'((num + 5 * (nit - 1)) / (10 * (nit - 1)));
  endfunction

endpackage
