// mstc_encoder: parallel encoder of the three-dimensional multiple slice
// turbo code (3D-MSTC).
//
// The frame of N = M*P duobinary symbols is written in natural order into P
// single-port banks: symbol j lives in bank j / M at address j mod M. The
// encoder then codes the three dimensions one after the other with the same
// hardware: for t = 0..M-1 the address generator gives the common address
// PiT(t) and the rotation A(t mod P); all banks are read at PiT(t), the
// rotator hands bank (A + r) mod P to slice encoder r, and the (A,B) swap of
// the dimension is applied. Every slice encoder is circular, so each
// dimension takes two passes over the frame: one to find the final state
// from state 0, one from the circulation state that emits the parity.
// The puncturer marks which parity bits are sent.
//
// Interface: while idle, `in_valid` writes symbols in_sym[r] = {A,B} of frame
// index r*M + in_addr. `start` launches the encoding. During the second pass
// of dimension d (y1, y2, y3 for d = 0, 1, 2) `out_valid` is high for M
// cycles, each carrying the parity bits of frame indices r*M + out_t of that
// dimension's order, with their keep flags. In dimension 0, out_sys gives
// the systematic symbols in natural order. `done` pulses at the end.
// punct_h is sampled with `start` and holds for the whole frame.
// Timing: one symbol per slice per cycle; `done` comes 3*2*(M+1)+1 cycles
// after `start` (two passes of M symbols and one bubble per dimension).
// The dataflow follows the published architecture (single address stream,
// barrel shifter, P slice encoders); the two-pass circular encoding and the
// handshake are this design's own.
module mstc_encoder
  import mstc_pkg::*;
#(
  parameter int unsigned M = 256,
  parameter int unsigned P = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  ilv_cfg_t              cfg1,
  input  ilv_cfg_t              cfg2,
  input  logic [7:0]            punct_h,       // puncturing period (32 in the evaluated code)
  input  logic                  in_valid,
  input  logic [$clog2(M)-1:0]  in_addr,
  input  logic [P-1:0][1:0]     in_sym,
  input  logic                  start,
  output logic                  busy,
  output logic                  out_valid,
  output logic [1:0]            out_dim,
  output logic [$clog2(M)-1:0]  out_t,
  output logic [P-1:0]          out_par,
  output logic [P-1:0]          out_keep,
  output logic [P-1:0][1:0]     out_sys,
  output logic                  done
);
  localparam int unsigned AW = $clog2(M);
  localparam int unsigned PW = $clog2(P);

  // issue side
  logic          run;
  logic [1:0]    dim;
  logic          pass;
  logic [AW:0]   t;                 // M = bubble between passes
  logic [AW-1:0] ag_addr;
  logic [PW-1:0] ag_rot;
  logic          ag_swap;
  logic          issue;

  // pipeline stage (bank data valid)
  logic          p_v, p_pass, p_swap;
  logic [1:0]    p_dim;
  logic [AW-1:0] p_t;
  logic [PW-1:0] p_rot;
  logic          lc;
  logic [7:0]    h_q;              // puncturing period of the current frame

  logic [P-1:0][1:0] bank_q, slice_sym;
  logic [P-1:0]      y;
  logic [P-1:0]      keep;

  assign issue = run && (t < (AW+1)'(M));
  assign busy  = run || p_v || lc;

  mstc_addr_gen #(.M(M), .P(P)) u_ag (
    .dim(dim), .t(t[AW-1:0]), .cfg1(cfg1), .cfg2(cfg2),
    .addr(ag_addr), .rot(ag_rot), .swap(ag_swap)
  );

  for (genvar r = 0; r < P; r++) begin : g_bank
    mstc_ram #(.W(2), .DEPTH(M)) u_bank (
      .clk(clk), .en(issue || (in_valid && !busy)), .we(in_valid && !busy),
      .addr(busy ? ag_addr : in_addr), .wdata(in_sym[r]), .rdata(bank_q[r])
    );
  end

  mstc_rotator #(.P(P), .W(2), .INVERSE(1'b0)) u_rot (
    .amt(p_rot), .din(bank_q), .dout(slice_sym)
  );

  for (genvar r = 0; r < P; r++) begin : g_enc
    logic a, b;
    assign a = p_swap ? slice_sym[r][0] : slice_sym[r][1];
    assign b = p_swap ? slice_sym[r][1] : slice_sym[r][0];
    mstc_crsc_enc #(.M(M)) u_enc (
      .clk(clk), .rst_n(rst_n),
      .clear(issue && !pass && t == '0), .load_circ(lc), .en(p_v),
      .a(a), .b(b), .y(y[r]), .state()
    );
  end

  mstc_puncturer #(.M(M), .P(P)) u_punct (
    .h(h_q), .dim(p_dim), .t(p_t), .keep(keep)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; dim <= '0; pass <= 1'b0; t <= '0;
      p_v <= 1'b0; p_pass <= 1'b0; p_swap <= 1'b0; p_dim <= '0; p_t <= '0; p_rot <= '0;
      lc <= 1'b0; done <= 1'b0; h_q <= 8'd32;
    end else begin
      done <= 1'b0;
      lc   <= p_v && !p_pass && p_t == AW'(M - 1);
      p_v    <= issue;
      p_pass <= pass;
      p_swap <= ag_swap;
      p_dim  <= dim;
      p_t    <= t[AW-1:0];
      p_rot  <= ag_rot;
      if (!run) begin
        if (start && !busy) begin
          run <= 1'b1; dim <= '0; pass <= 1'b0; t <= '0;
          h_q <= punct_h;
        end
      end else if (t == (AW+1)'(M)) begin
        t <= '0;
        if (pass) begin
          pass <= 1'b0;
          if (dim == 2'd2) begin
            run <= 1'b0;
            done <= 1'b1;
          end else dim <= dim + 2'd1;
        end else pass <= 1'b1;
      end else begin
        t <= t + 1'b1;
      end
    end
  end

  assign out_valid = p_v && p_pass;
  assign out_dim   = p_dim;
  assign out_t     = p_t;
  assign out_par   = y;
  assign out_keep  = keep;
  assign out_sys   = bank_q;
endmodule
