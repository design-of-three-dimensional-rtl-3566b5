// mstc3d_top: encoder and decoder of the three-dimensional multiple slice
// turbo code (3D-MSTC), rate 1/2, duobinary 8-state constituent codes.
//
// The two halves share the interleaver configuration (cfg1 for dimension 1,
// cfg2 for dimension 2) and otherwise stand side by side: the encoder turns
// a frame of N = M*P symbols into three parity streams with their puncturing
// flags; the decoder takes the channel LLRs of a frame (punctured positions
// as 0) and returns the decided symbols after NIT iterations of the hybrid
// extended serial schedule (or the plain extended serial one, hybrid = 0).
// The puncturing period punct_h (1, 3 or a power of two up to 128; 32 in the
// evaluated code) is sampled by the encoder with enc_start, so it may change
// from frame to frame.
// The mapping of encoder output to channel and back is outside this block.
// See mstc_encoder and mstc_decoder for the interfaces and their timing.
// The code structure, schedules and memory organisation follow the published
// design; the run-time period, the port set and the handshakes are this
// design's own.
module mstc3d_top
  import mstc_pkg::*;
#(
  parameter int unsigned M   = 256,            // symbols per slice
  parameter int unsigned P   = 8,              // slices (parallel SISOs)
  parameter int unsigned NIT = 10              // decoding iterations
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  ilv_cfg_t                    cfg1,
  input  ilv_cfg_t                    cfg2,
  // encoder
  input  logic [7:0]                  punct_h,     // puncturing period: 1, 3, 4..128 (2^n)
  input  logic                        enc_in_valid,
  input  logic [$clog2(M)-1:0]        enc_in_addr,
  input  logic [P-1:0][1:0]           enc_in_sym,
  input  logic                        enc_start,
  output logic                        enc_busy,
  output logic                        enc_out_valid,
  output logic [1:0]                  enc_out_dim,
  output logic [$clog2(M)-1:0]        enc_out_t,
  output logic [P-1:0]                enc_out_par,
  output logic [P-1:0]                enc_out_keep,
  output logic [P-1:0][1:0]           enc_out_sys,
  output logic                        enc_done,
  // decoder
  input  logic                        hybrid,
  output logic                        ld_ready,
  input  logic                        ld_valid,
  input  logic                        ld_last,
  input  logic [$clog2(M)-1:0]        ld_addr,
  input  sys_llr_t [P-1:0]            ld_sys,
  input  logic [P-1:0][2:0][W_CH-1:0] ld_par,
  output logic                        dec_busy,
  output logic                        sub_start,
  output logic [1:0]                  sub_dim,
  output logic                        dec_valid,
  output logic [$clog2(M)-1:0]        dec_addr,
  output logic [P-1:0][1:0]           dec_sym,
  output logic                        frame_done
);
  mstc_encoder #(.M(M), .P(P)) u_enc (
    .clk(clk), .rst_n(rst_n), .cfg1(cfg1), .cfg2(cfg2), .punct_h(punct_h),
    .in_valid(enc_in_valid), .in_addr(enc_in_addr), .in_sym(enc_in_sym),
    .start(enc_start), .busy(enc_busy),
    .out_valid(enc_out_valid), .out_dim(enc_out_dim), .out_t(enc_out_t),
    .out_par(enc_out_par), .out_keep(enc_out_keep), .out_sys(enc_out_sys),
    .done(enc_done)
  );

  mstc_decoder #(.M(M), .P(P), .NIT(NIT)) u_dec (
    .clk(clk), .rst_n(rst_n), .cfg1(cfg1), .cfg2(cfg2), .hybrid(hybrid),
    .ld_ready(ld_ready), .ld_valid(ld_valid), .ld_last(ld_last), .ld_addr(ld_addr),
    .ld_sys(ld_sys), .ld_par(ld_par),
    .busy(dec_busy), .sub_start(sub_start), .sub_dim(sub_dim),
    .dec_valid(dec_valid), .dec_addr(dec_addr), .dec_sym(dec_sym),
    .frame_done(frame_done)
  );
endmodule
