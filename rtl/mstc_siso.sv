// mstc_siso: max-log-MAP soft-in soft-out decoder of one duobinary
// circular slice (8-state trellis of mstc_pkg).
//
// A slice of M symbols is processed in two phases:
//   LOAD  M input cycles (in_valid) in temporal order t = 0..M-1. Each input
//         is kept in a local buffer and the forward recursion runs on the
//         fly: alpha_t is stored, alpha_{t+1}(s') = max over the four
//         branches into s' of alpha_t(s) + gamma_t(s,u).
//   BWD   M cycles in reverse order t = M-1..0: the backward recursion
//         beta_t(s) = max_u gamma_t(s,u) + beta_{t+1}(next(s,u)) and, for
//         each symbol value u = {A,B}, Lambda(u) = max_s alpha_t(s) +
//         parity part of gamma + beta_{t+1}(next(s,u)). The extrinsic output
//         is Lambda(u) - Lambda(00) (a priori and systematic parts removed),
//         the hard decision is the u with the largest a posteriori metric.
// The branch metric is gamma(s,u) = apr(u) + A*la + B*lb + Y(s,u)*lp with LLRs
// positive for a 1. Metrics are renormalised every step by subtracting the
// metric of state 0.
// The circular trellis is handled by the caller: alpha_init / beta_init
// start the recursions, and alpha_final (alpha_M) / beta_final (beta_0)
// are returned so that the next decoding of the same slice can start from
// them. The max-log-MAP algorithm is the one the source names; this
// full-slice (non-windowed) two-phase organisation is this design's own.
// Interface: `start` (while idle) latches the initial metrics and opens the
// LOAD phase; `in_ready` is high during LOAD. Outputs of symbol t appear
// with out_valid, t descending. `done` pulses together with the last output.
// Latency: 2*M + 2 cycles per slice.
module mstc_siso
  import mstc_pkg::*;
#(
  parameter int unsigned M = 256
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  smv_t                              alpha_init,
  input  smv_t                              beta_init,
  output logic                              in_ready,
  input  logic                              in_valid,
  input  logic signed [W_CH-1:0]            in_la,
  input  logic signed [W_CH-1:0]            in_lb,
  input  logic signed [W_CH-1:0]            in_lp,
  input  ext_t                              in_apr,
  output logic                              out_valid,
  output logic [$clog2(M)-1:0]              out_t,
  output ext_t                              out_ext,
  output logic [1:0]                        out_hard,
  output smv_t                              alpha_final,
  output smv_t                              beta_final,
  output logic                              done
);
  localparam int unsigned AW = $clog2(M);
  localparam int unsigned BW = 3 * W_CH + 3 * W_EXT;    // buffered input word

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_BWD} state_e;
  state_e st;

  logic [AW:0]   cnt;
  smv_t          alpha, beta;
  logic          rd_v;
  logic [AW-1:0] rd_t;

  // local memories
  logic          buf_we, mem_en;
  logic [AW-1:0] mem_addr;
  logic [BW-1:0] buf_wd, buf_rd;
  smv_t          alpha_rd;

  assign in_ready = (st == S_LOAD);
  assign buf_we   = (st == S_LOAD) && in_valid;
  assign mem_en   = buf_we || (st == S_BWD && cnt != '0);
  assign mem_addr = (st == S_LOAD) ? cnt[AW-1:0] : AW'(cnt - 1'b1);
  assign buf_wd   = {in_la, in_lb, in_lp, in_apr};

  mstc_ram #(.W(BW), .DEPTH(M)) u_buf (
    .clk(clk), .en(mem_en), .we(buf_we), .addr(mem_addr), .wdata(buf_wd), .rdata(buf_rd)
  );
  mstc_ram #(.W(NSTATE * W_SM), .DEPTH(M)) u_alpha (
    .clk(clk), .en(mem_en), .we(buf_we), .addr(mem_addr), .wdata(alpha), .rdata(alpha_rd)
  );

  // gamma without the a priori and systematic part, and the full gamma
  function automatic sm_t sx_ch(input logic signed [W_CH-1:0] v);
    return sm_t'(v);
  endfunction

  // ---------------- forward step (LOAD) ----------------
  smv_t alpha_nx;
  always_comb begin
    sm_t cand, g;
    logic [2:0] ns;
    sm_t acc [NSTATE];
    logic [NSTATE-1:0] seen;
    seen = '0;
    for (int s = 0; s < NSTATE; s++) acc[s] = '0;
    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 4; u++) begin
        g = (u == 0) ? sm_t'(0) : sm_t'(in_apr[u-1]);
        if (u[1]) g = g + sx_ch(in_la);
        if (u[0]) g = g + sx_ch(in_lb);
        if (trellis_par(3'(s), u[1], u[0])) g = g + sx_ch(in_lp);
        cand = alpha[s] + g;
        ns = trellis_next(3'(s), u[1], u[0]);
        if (!seen[ns] || cand > acc[ns]) acc[ns] = cand;
        seen[ns] = 1'b1;
      end
    end
    for (int s = 0; s < NSTATE; s++) alpha_nx[s] = acc[s] - acc[0];
  end

  // ---------------- backward step and outputs (BWD) ----------------
  logic signed [W_CH-1:0] b_la, b_lb, b_lp;
  ext_t                   b_apr;
  smv_t                   beta_nx;
  ext_t                   ext_c;
  logic [1:0]             hard_c;

  assign {b_la, b_lb, b_lp, b_apr} = buf_rd;

  always_comb begin
    sm_t par, gsys, cand, lam0, d;
    sm_t lam [4];
    sm_t app [4];
    sm_t bacc [NSTATE];
    logic [3:0] lseen;
    logic [NSTATE-1:0] bseen;
    logic [2:0] ns;
    lseen = '0;
    bseen = '0;
    for (int u = 0; u < 4; u++) begin lam[u] = '0; app[u] = '0; end
    for (int s = 0; s < NSTATE; s++) bacc[s] = '0;
    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 4; u++) begin
        ns   = trellis_next(3'(s), u[1], u[0]);
        par  = trellis_par(3'(s), u[1], u[0]) ? sx_ch(b_lp) : sm_t'(0);
        gsys = (u == 0) ? sm_t'(0) : sm_t'(b_apr[u-1]);
        if (u[1]) gsys = gsys + sx_ch(b_la);
        if (u[0]) gsys = gsys + sx_ch(b_lb);
        cand = alpha_rd[s] + par + beta[ns];
        if (!lseen[u] || cand > lam[u]) lam[u] = cand;
        lseen[u] = 1'b1;
        cand = gsys + par + beta[ns];
        if (!bseen[s] || cand > bacc[s]) bacc[s] = cand;
        bseen[s] = 1'b1;
      end
    end
    for (int s = 0; s < NSTATE; s++) beta_nx[s] = bacc[s] - bacc[0];
    lam0 = lam[0];
    for (int u = 1; u < 4; u++) begin
      d = lam[u] - lam0;
      if (d > sm_t'(2 ** (W_EXT - 1) - 1))   ext_c[u-1] = W_EXT'(2 ** (W_EXT - 1) - 1);
      else if (d < sm_t'(-(2 ** (W_EXT - 1)))) ext_c[u-1] = W_EXT'(-(2 ** (W_EXT - 1)));
      else                                    ext_c[u-1] = W_EXT'(d);
    end
    app[0] = lam[0];
    app[1] = lam[1] + sm_t'(b_apr[0]) + sx_ch(b_lb);
    app[2] = lam[2] + sm_t'(b_apr[1]) + sx_ch(b_la);
    app[3] = lam[3] + sm_t'(b_apr[2]) + sx_ch(b_la) + sx_ch(b_lb);
    hard_c = 2'd0;
    for (int u = 1; u < 4; u++) if (app[u] > app[hard_c]) hard_c = 2'(u);
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; alpha <= '0; beta <= '0; rd_v <= 1'b0; rd_t <= '0;
      alpha_final <= '0; beta_final <= '0; done <= 1'b0;
      out_valid <= 1'b0; out_t <= '0; out_ext <= '0; out_hard <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      rd_v      <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          alpha <= alpha_init;
          beta  <= beta_init;
          cnt   <= '0;
          st    <= S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          alpha <= alpha_nx;
          if (cnt == (AW+1)'(M - 1)) begin
            alpha_final <= alpha_nx;
            cnt <= (AW+1)'(M);
            st  <= S_BWD;
          end else cnt <= cnt + 1'b1;
        end
        S_BWD: begin
          if (cnt != '0) begin
            rd_v <= 1'b1;
            rd_t <= AW'(cnt - 1'b1);
            cnt  <= cnt - 1'b1;
          end
          if (rd_v) begin
            beta      <= beta_nx;
            out_valid <= 1'b1;
            out_t     <= rd_t;
            out_ext   <= ext_c;
            out_hard  <= hard_c;
            if (rd_t == '0) begin
              beta_final <= beta_nx;
              st   <= S_IDLE;
              done <= 1'b1;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
