// mstc_decoder: parallel turbo decoder of the three-dimensional multiple
// slice turbo code.
//
// P max-log-MAP SISOs decode the P slices of one code dimension at the same
// time. All their data live in P single-port banks per memory, indexed like
// the frame (symbol j in bank j / M at address j mod M); for dimension d and
// temporal index t every bank is accessed at the same address PiT(t) and a
// barrel shifter routes bank (A(t mod P) + r) mod P to SISO r, so no bank
// is ever asked for two words at once. The memories are:
//   * intrinsic memory, two copies (ping-pong): while one frame is decoded
//     the next is loaded. Each copy holds the systematic LLRs (interleaved
//     access) and the three parity LLRs (slice r, time t at bank r, address t);
//   * two extrinsic memories, as the extended serial structure needs the
//     extrinsic information of two dimensions per symbol;
//   * a decision memory, written by every subiteration, read at the end;
//   * the circular-trellis boundary metrics of every slice and dimension,
//     carried from one decoding of a slice to the next (zero at frame start).
// mstc_hes_sched chooses the dimension of each subiteration, the extrinsic
// memories to add as a priori, the memory to write and the scaling factor.
// A subiteration reads the M symbols in order t (LOAD phase of the SISOs),
// then writes the scaled extrinsic and the decisions back at the same
// addresses while the SISOs run backwards. Dimensions 1 and 2 exchange the
// two bits of a symbol (and the 01/10 extrinsic values) on the symbols the
// address generator flags.
//
// Load interface: while `ld_ready`, `ld_valid` writes address ld_addr of
// all banks: ld_sys[r] for frame symbol r*M+ld_addr, ld_par[r][d] for the
// parity of dimension d, slice r, time ld_addr (0 where punctured). `ld_last`
// with the final write hands the copy to the decoder.
// Output: after the last subiteration, M cycles of `dec_valid` give the
// decided symbols {A,B} of frame indices r*M + dec_addr; `frame_done` pulses
// after the last. `sub_start`/`sub_dim` report each subiteration.
// Timing: 2*M + 4 cycles per subiteration, J subiterations (J = 25 for HES
// with NIT = 10, 30 for ES), plus M + 1 cycles of output.
// The memory organisation, the shuffle network, the number of extrinsic
// memories and the schedule follow the source; the SISO organisation, the
// boundary-metric carry-over, fixed-point widths and handshakes are this
// design's own.
module mstc_decoder
  import mstc_pkg::*;
#(
  parameter int unsigned M   = 256,
  parameter int unsigned P   = 8,
  parameter int unsigned NIT = 10
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  ilv_cfg_t                              cfg1,
  input  ilv_cfg_t                              cfg2,
  input  logic                                  hybrid,      // 1: HES, 0: ES
  output logic                                  ld_ready,
  input  logic                                  ld_valid,
  input  logic                                  ld_last,
  input  logic [$clog2(M)-1:0]                  ld_addr,
  input  sys_llr_t [P-1:0]                      ld_sys,
  input  logic [P-1:0][2:0][W_CH-1:0]           ld_par,
  output logic                                  busy,
  output logic                                  sub_start,
  output logic [1:0]                            sub_dim,
  output logic                                  dec_valid,
  output logic [$clog2(M)-1:0]                  dec_addr,
  output logic [P-1:0][1:0]                     dec_sym,
  output logic                                  frame_done
);
  localparam int unsigned AW = $clog2(M);
  localparam int unsigned PW = $clog2(P);
  localparam int unsigned SYSW = 2 * W_CH;
  localparam int unsigned PARW = 3 * W_CH;
  localparam int unsigned EXTW = 3 * W_EXT;

  typedef enum logic [2:0] {D_IDLE, D_SSTART, D_READ, D_WAIT, D_OUT} dstate_e;
  dstate_e st;

  // ---------------- intrinsic buffers: host side ----------------
  logic       wbuf, dbuf;
  logic [1:0] full;
  logic       ld_fire;
  assign ld_ready = !full[wbuf];
  assign ld_fire  = ld_valid && ld_ready;

  // ---------------- scheduler ----------------
  logic            sch_start, sch_busy, sch_valid, sch_last, sch_wr, sch_done, sub_done;
  logic [1:0]      sch_dim, sch_use;
  logic [3:0]      sch_it;
  logic [W_SF-1:0] sch_scale;

  mstc_hes_sched #(.NIT(NIT)) u_sched (
    .clk(clk), .rst_n(rst_n), .start(sch_start), .hybrid(hybrid), .busy(sch_busy),
    .cmd_valid(sch_valid), .cmd_dim(sch_dim), .cmd_it(sch_it), .cmd_scale(sch_scale),
    .cmd_rd_use(sch_use), .cmd_wr_sel(sch_wr), .cmd_last(sch_last),
    .sub_done(sub_done), .done(sch_done)
  );

  // latched command
  logic [1:0]      c_dim;
  logic [1:0]      c_use;
  logic            c_wr;
  logic            c_last;
  logic [W_SF-1:0] c_scale;

  // ---------------- read side address generation ----------------
  logic [AW:0]   t;
  logic          rd_issue;
  logic [AW-1:0] r_addr;
  logic [PW-1:0] r_rot;
  logic          r_swap;
  logic          p_v, p_swap;
  logic [PW-1:0] p_rot;

  assign rd_issue = (st == D_READ);

  mstc_addr_gen #(.M(M), .P(P)) u_ag_rd (
    .dim(c_dim), .t(t[AW-1:0]), .cfg1(cfg1), .cfg2(cfg2),
    .addr(r_addr), .rot(r_rot), .swap(r_swap)
  );

  // ---------------- SISO outputs and write side ----------------
  logic [P-1:0]          s_ready, s_ovalid, s_done;
  logic [P-1:0][AW-1:0]  s_ot;
  ext_t [P-1:0]          s_oext;
  logic [P-1:0][1:0]     s_ohard;
  smv_t [P-1:0]          s_afin, s_bfin;
  logic [AW-1:0]         w_addr;
  logic [PW-1:0]         w_rot;
  logic                  w_swap;
  logic                  wr_v;

  assign wr_v = s_ovalid[0];

  mstc_addr_gen #(.M(M), .P(P)) u_ag_wr (
    .dim(c_dim), .t(s_ot[0]), .cfg1(cfg1), .cfg2(cfg2),
    .addr(w_addr), .rot(w_rot), .swap(w_swap)
  );

  // ---------------- memories ----------------
  logic [1:0][P-1:0][SYSW-1:0] sys_q;
  logic [1:0][P-1:0][PARW-1:0] par_q;
  logic [1:0][P-1:0][EXTW-1:0] ext_q;
  logic [P-1:0][EXTW-1:0]      ext_wd;
  logic [P-1:0][1:0]           hard_wd, dec_q;
  logic [AW-1:0]               out_t;
  logic                        out_issue;

  for (genvar k = 0; k < 2; k++) begin : g_ibuf
    logic hwr, drd;
    assign hwr = ld_fire && (wbuf == 1'(k));
    assign drd = rd_issue && (dbuf == 1'(k));
    for (genvar r = 0; r < P; r++) begin : g_bank
      mstc_ram #(.W(SYSW), .DEPTH(M)) u_sys (
        .clk(clk), .en(hwr || drd), .we(hwr), .addr(hwr ? ld_addr : r_addr),
        .wdata(ld_sys[r]), .rdata(sys_q[k][r])
      );
      mstc_ram #(.W(PARW), .DEPTH(M)) u_par (
        .clk(clk), .en(hwr || drd), .we(hwr), .addr(hwr ? ld_addr : t[AW-1:0]),
        .wdata(ld_par[r]), .rdata(par_q[k][r])
      );
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_ext
    logic wr;
    assign wr = wr_v && (c_wr == 1'(k));
    for (genvar r = 0; r < P; r++) begin : g_bank
      mstc_ram #(.W(EXTW), .DEPTH(M)) u_ext (
        .clk(clk), .en(wr || rd_issue), .we(wr), .addr(wr ? w_addr : r_addr),
        .wdata(ext_wd[r]), .rdata(ext_q[k][r])
      );
    end
  end

  for (genvar r = 0; r < P; r++) begin : g_dec
    mstc_ram #(.W(2), .DEPTH(M)) u_dec (
      .clk(clk), .en(wr_v || out_issue), .we(wr_v), .addr(wr_v ? w_addr : out_t),
      .wdata(hard_wd[r]), .rdata(dec_q[r])
    );
  end

  // ---------------- read datapath: banks -> SISOs ----------------
  logic [P-1:0][SYSW-1:0] sys_rot;
  logic [1:0][P-1:0][EXTW-1:0] ext_rot;

  mstc_rotator #(.P(P), .W(SYSW), .INVERSE(1'b0)) u_rot_sys (
    .amt(p_rot), .din(sys_q[dbuf]), .dout(sys_rot)
  );
  for (genvar k = 0; k < 2; k++) begin : g_rot_ext
    mstc_rotator #(.P(P), .W(EXTW), .INVERSE(1'b0)) u_rot_ext (
      .amt(p_rot), .din(ext_q[k]), .dout(ext_rot[k])
    );
  end

  function automatic logic signed [W_EXT-1:0] sat_ext(input logic signed [W_EXT+1:0] v);
    if (v > (W_EXT+2)'(2 ** (W_EXT - 1) - 1))   return W_EXT'(2 ** (W_EXT - 1) - 1);
    if (v < -(W_EXT+2)'(2 ** (W_EXT - 1)))      return W_EXT'(-(2 ** (W_EXT - 1)));
    return W_EXT'(v);
  endfunction

  smv_t [NDIM-1:0][P-1:0] m_alpha, m_beta;   // boundary metrics per dimension and slice

  for (genvar r = 0; r < P; r++) begin : g_siso
    sys_llr_t                sl;
    logic signed [W_CH-1:0]  la, lb, lp;
    ext_t                    e0, e1, apr, apr_sw;
    logic [PARW-1:0]         pw;

    assign sl  = sys_rot[r];
    assign e0  = ext_rot[0][r];
    assign e1  = ext_rot[1][r];
    assign pw  = par_q[dbuf][r];
    assign la  = p_swap ? sl.lb : sl.la;
    assign lb  = p_swap ? sl.la : sl.lb;
    assign lp  = pw[c_dim * W_CH +: W_CH];

    always_comb begin
      for (int v = 0; v < 3; v++)
        apr[v] = sat_ext((W_EXT+2)'(c_use[0] ? e0[v] : ext_val_t'(0)) + (W_EXT+2)'(c_use[1] ? e1[v] : ext_val_t'(0)));
      // value index: 0 = {A,B}=01, 1 = 10, 2 = 11; a swap exchanges 01 and 10
      apr_sw = p_swap ? {apr[2], apr[0], apr[1]} : apr;
    end

    mstc_siso #(.M(M)) u_siso (
      .clk(clk), .rst_n(rst_n), .start(st == D_SSTART),
      .alpha_init(m_alpha[sch_dim][r]), .beta_init(m_beta[sch_dim][r]),
      .in_ready(s_ready[r]), .in_valid(p_v),
      .in_la(la), .in_lb(lb), .in_lp(lp), .in_apr(apr_sw),
      .out_valid(s_ovalid[r]), .out_t(s_ot[r]), .out_ext(s_oext[r]), .out_hard(s_ohard[r]),
      .alpha_final(s_afin[r]), .beta_final(s_bfin[r]), .done(s_done[r])
    );
  end

  // ---------------- write datapath: SISOs -> banks ----------------
  logic [P-1:0][EXTW-1:0] ext_slice;
  logic [P-1:0][1:0]      hard_slice;

  always_comb begin
    for (int r = 0; r < P; r++) begin
      ext_t e, es;
      logic signed [W_EXT+W_SF:0] prod;
      e  = s_oext[r];
      es = w_swap ? {e[2], e[0], e[1]} : e;
      for (int v = 0; v < 3; v++) begin
        prod = (W_EXT+W_SF+1)'(es[v]) * $signed({1'b0, c_scale});
        es[v] = W_EXT'(prod >>> 4);
      end
      ext_slice[r]  = es;
      hard_slice[r] = w_swap ? {s_ohard[r][0], s_ohard[r][1]} : s_ohard[r];
    end
  end

  mstc_rotator #(.P(P), .W(EXTW), .INVERSE(1'b1)) u_rot_wext (
    .amt(w_rot), .din(ext_slice), .dout(ext_wd)
  );
  mstc_rotator #(.P(P), .W(2), .INVERSE(1'b1)) u_rot_whard (
    .amt(w_rot), .din(hard_slice), .dout(hard_wd)
  );

  // ---------------- control ----------------
  logic o_v;
  logic [AW-1:0] o_t;
  logic [AW:0]   oc;

  assign sch_start = (st == D_IDLE) && full[dbuf] && !sch_busy;
  assign sub_done  = (st == D_WAIT) && s_done[0];
  assign out_issue = (st == D_OUT) && (oc < (AW+1)'(M));
  assign out_t     = oc[AW-1:0];
  assign busy      = (st != D_IDLE);
  assign sub_start = (st == D_SSTART);
  assign sub_dim   = sch_dim;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; wbuf <= 1'b0; dbuf <= 1'b0; full <= '0;
      c_dim <= '0; c_use <= '0; c_wr <= 1'b0; c_last <= 1'b0; c_scale <= '0;
      t <= '0; p_v <= 1'b0; p_swap <= 1'b0; p_rot <= '0;
      oc <= '0; o_v <= 1'b0; o_t <= '0; frame_done <= 1'b0;
      m_alpha <= '0; m_beta <= '0;
    end else begin
      frame_done <= 1'b0;
      p_v    <= rd_issue;
      p_swap <= r_swap;
      p_rot  <= r_rot;
      o_v    <= out_issue;
      o_t    <= out_t;

      if (ld_fire && ld_last) begin
        full[wbuf] <= 1'b1;
        wbuf       <= ~wbuf;
      end

      case (st)
        D_IDLE: if (sch_start) begin
          m_alpha <= '0;
          m_beta  <= '0;
          st      <= D_SSTART;
        end
        D_SSTART: if (sch_valid) begin
          c_dim   <= sch_dim;
          c_use   <= sch_use;
          c_wr    <= sch_wr;
          c_last  <= sch_last;
          c_scale <= sch_scale;
          t       <= '0;
          st      <= D_READ;
        end
        D_READ: begin
          if (t == (AW+1)'(M - 1)) st <= D_WAIT;
          t <= t + 1'b1;
        end
        D_WAIT: if (s_done[0]) begin
          for (int r = 0; r < P; r++) begin
            m_alpha[c_dim][r] <= s_afin[r];
            m_beta[c_dim][r]  <= s_bfin[r];
          end
          oc <= '0;
          st <= c_last ? D_OUT : D_SSTART;
        end
        D_OUT: begin
          if (oc == (AW+1)'(M)) begin
            full[dbuf] <= 1'b0;
            dbuf       <= ~dbuf;
            frame_done <= 1'b1;
            st         <= D_IDLE;
          end
          oc <= oc + 1'b1;
        end
        default: st <= D_IDLE;
      endcase
    end
  end

  assign dec_valid = o_v;
  assign dec_addr  = o_t;
  assign dec_sym   = dec_q;

  // the SISOs run in lock step
  assert property (@(posedge clk) disable iff (!rst_n) p_v |-> &s_ready)
    else $error("SISO not ready for input");
endmodule
