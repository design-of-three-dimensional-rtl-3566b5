// tb_mstc3d_top: end-to-end test of the 3D-MSTC codec at its full size
// (frames of 2048 duobinary symbols = 4096 bits, 8 slices of 256,
// 10 iterations).
// Four random frames go through the encoder; its punctured output is sent
// over a noisy channel model (punctured bits become LLR 0) and loaded into
// the decoder, whose decisions must equal the frames. Frame 1 is decoded
// with the plain extended serial schedule, the others with the hybrid one.
// Frames 0 and 1 use the puncturing period 32 of the evaluated code, frame 2
// period 8 and frame 3 the regular period 3. Frames are encoded and loaded
// while earlier ones are being decoded.
// Every mechanism is counted and must have occurred: puncturing period
// changes, punctured parity bits, symbol-bit swaps, non-zero circulation
// states, loads into the second intrinsic buffer during decoding, load
// back-pressure, skipped and decoded third-dimension subiterations, the ES
// frame, and channel errors corrected.
module tb_mstc3d_top;
  import mstc_pkg::*;
  import tb_mstc_ref_pkg::*;
  localparam int M = 256, P = 8, NIT = 10;
  localparam int AMP = 12, SD = 7, NF = 4;
  localparam int HF [NF] = '{32, 32, 8, 3};     // puncturing period of each frame

  logic clk = 0, rst_n = 0;
  logic enc_in_valid = 0, enc_start = 0;
  logic [7:0] enc_in_addr = 0;
  logic [P-1:0][1:0] enc_in_sym = '0;
  logic enc_busy, enc_out_valid, enc_done;
  logic [1:0] enc_out_dim;
  logic [7:0] enc_out_t;
  logic [P-1:0] enc_out_par, enc_out_keep;
  logic [P-1:0][1:0] enc_out_sys;
  logic hybrid = 1;
  logic [7:0] punct_h = 8'd32;
  logic ld_ready, ld_valid = 0, ld_last = 0;
  logic [7:0] ld_addr = 0;
  sys_llr_t [P-1:0] ld_sys = '0;
  logic [P-1:0][2:0][W_CH-1:0] ld_par = '0;
  logic dec_busy, sub_start, dec_valid, frame_done;
  logic [1:0] sub_dim;
  logic [7:0] dec_addr;
  logic [P-1:0][1:0] dec_sym;
  int checks = 0, failures = 0;

  mstc3d_top dut (
    .clk(clk), .rst_n(rst_n), .cfg1(DEF_ILV1), .cfg2(DEF_ILV2), .punct_h(punct_h),
    .enc_in_valid(enc_in_valid), .enc_in_addr(enc_in_addr), .enc_in_sym(enc_in_sym),
    .enc_start(enc_start), .enc_busy(enc_busy), .enc_out_valid(enc_out_valid),
    .enc_out_dim(enc_out_dim), .enc_out_t(enc_out_t), .enc_out_par(enc_out_par),
    .enc_out_keep(enc_out_keep), .enc_out_sys(enc_out_sys), .enc_done(enc_done),
    .hybrid(hybrid), .ld_ready(ld_ready), .ld_valid(ld_valid), .ld_last(ld_last),
    .ld_addr(ld_addr), .ld_sys(ld_sys), .ld_par(ld_par), .dec_busy(dec_busy),
    .sub_start(sub_start), .sub_dim(sub_dim), .dec_valid(dec_valid), .dec_addr(dec_addr),
    .dec_sym(dec_sym), .frame_done(frame_done)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] frames [NF][M*P];
  logic       rx_par  [3][M*P];     // encoder parity, by interleaved index
  logic       rx_keep [3][M*P];
  int raw_err [NF];

  // mechanism counters
  int n_hswitch, n_punct, n_swap, n_circ, n_pingpong, n_backpressure, n_skip3, n_dec3, n_corrected, n_es;

  // capture encoder output
  always @(posedge clk) if (rst_n && enc_out_valid) begin
    for (int r = 0; r < P; r++) begin
      rx_par[enc_out_dim][r * M + int'(enc_out_t)]  <= enc_out_par[r];
      rx_keep[enc_out_dim][r * M + int'(enc_out_t)] <= enc_out_keep[r];
      if (!enc_out_keep[r]) n_punct++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.u_enc.p_v && dut.u_enc.p_swap) n_swap++;
    if (dut.u_enc.lc) n_circ++;             // counts circulation loads; non-zero states below
    if (ld_valid && ld_ready && dec_busy) n_pingpong++;
    if (ld_valid && !ld_ready) n_backpressure++;
  end

  task automatic encode_and_load(input int f);
    logic par [3][];
    logic [1:0] fr [];
    fr = new[M * P];
    for (int i = 0; i < M * P; i++) begin frames[f][i] = 2'($urandom); fr[i] = frames[f][i]; end
    for (int d = 0; d < 3; d++) ref_encode(fr, d, M, P, DEF_ILV1, DEF_ILV2, par[d]);
    // write the frame into the encoder and run it
    if (f > 0 && HF[f] != HF[f - 1]) n_hswitch++;
    punct_h = 8'(HF[f]);
    for (int a = 0; a < M; a++) begin
      @(negedge clk);
      enc_in_valid = 1; enc_in_addr = 8'(a);
      for (int r = 0; r < P; r++) enc_in_sym[r] = frames[f][r * M + a];
    end
    @(negedge clk) enc_in_valid = 0; enc_start = 1;
    @(negedge clk) enc_start = 0;
    punct_h = 8'd16;                 // must not matter: sampled at start
    while (!enc_done) @(negedge clk);
    @(negedge clk);
    // encoder output against the reference
    for (int d = 0; d < 3; d++)
      for (int k = 0; k < M * P; k++) begin
        checks++;
        if (rx_par[d][k] != par[d][k] || rx_keep[d][k] != punct_keep(2'(d), 8'(HF[f]), 16'(k))) failures++;
      end
    // channel and decoder load
    raw_err[f] = 0;
    for (int a = 0; a < M; a++) begin
      @(negedge clk);
      ld_valid = 1; ld_addr = 8'(a); ld_last = (a == M - 1);
      for (int r = 0; r < P; r++) begin
        int k;
        logic signed [W_CH-1:0] va, vb, vp;
        k = r * M + a;
        va = ref_llr(frames[f][k][1], AMP, SD);
        vb = ref_llr(frames[f][k][0], AMP, SD);
        ld_sys[r].la = va;
        ld_sys[r].lb = vb;
        if ((va > 0) != frames[f][k][1] || (vb > 0) != frames[f][k][0]) raw_err[f]++;
        for (int d = 0; d < 3; d++) begin
          vp = ref_llr(rx_par[d][k], AMP, SD);
          ld_par[r][d] = rx_keep[d][k] ? vp : '0;
        end
      end
      while (!ld_ready) @(negedge clk);
    end
    @(negedge clk) ld_valid = 0; ld_last = 0;
  endtask

  // decoder side
  int fdone, nerr, fout;
  int nsubs [NF][3];
  always @(posedge clk) if (rst_n) begin
    if (sub_start) nsubs[fdone][sub_dim] <= nsubs[fdone][sub_dim] + 1;
    if (frame_done) fdone <= fdone + 1;
    if (dec_valid)
      for (int r = 0; r < P; r++) begin
        checks++;
        if (dec_sym[r] != frames[fout][r * M + int'(dec_addr)]) nerr++;
      end
  end

  // non-zero circulation state seen by slice encoder 0
  logic lc_d;
  always @(posedge clk) begin
    lc_d <= dut.u_enc.lc;
    if (rst_n && lc_d && dut.u_enc.g_enc[0].u_enc.state != 3'd0) n_circ += 1000;
  end

  initial begin
    fdone = 0; fout = 0; nerr = 0;
    n_hswitch = 0; n_punct = 0; n_swap = 0; n_circ = 0; n_pingpong = 0; n_backpressure = 0;
    n_skip3 = 0; n_dec3 = 0; n_corrected = 0; n_es = 0;
    foreach (nsubs[i, j]) nsubs[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int f = 0; f < NF; f++) encode_and_load(f);
      for (int f = 0; f < NF; f++) begin
        int j;
        while (fdone == f && nsubs[f][0] == 0) @(negedge clk);
        hybrid = (f != 0);                 // frame 0 latched HES, frame 1 gets ES
        while (!frame_done) @(negedge clk);
        @(negedge clk);
        j = nsubs[f][0] + nsubs[f][1] + nsubs[f][2];
        checks++;
        if (j != ((f == 1) ? 30 : 25)) begin failures++; $display("frame %0d: J = %0d", f, j); end
        if (f == 1) n_es++;
        n_dec3 += nsubs[f][2];
        n_skip3 += NIT - nsubs[f][2];
        failures += nerr;
        if (nerr == 0 && raw_err[f] > 0) n_corrected += raw_err[f];
        $display("frame %0d: J = %0d (%0d third-dimension), %0d channel symbol errors, %0d after decoding",
                 f, j, nsubs[f][2], raw_err[f], nerr);
        nerr = 0;
        hybrid = 1'b1;
        fout++;
      end
    join
    $display("punctured %0d, swapped %0d, circulation %0d, ping-pong loads %0d, back-pressure %0d",
             n_punct, n_swap, n_circ, n_pingpong, n_backpressure);
    $display("third dimension skipped %0d / decoded %0d, ES frames %0d, corrected %0d",
             n_skip3, n_dec3, n_es, n_corrected);
    $display("puncturing period changes %0d", n_hswitch);
    checks++; if (n_hswitch == 0) failures++;
    checks++; if (n_punct == 0) failures++;
    checks++; if (n_swap == 0) failures++;
    checks++; if (n_circ < 1000) failures++;
    checks++; if (n_pingpong == 0) failures++;
    checks++; if (n_backpressure == 0) failures++;
    checks++; if (n_skip3 == 0) failures++;
    checks++; if (n_dec3 == 0) failures++;
    checks++; if (n_es == 0) failures++;
    checks++; if (n_corrected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
