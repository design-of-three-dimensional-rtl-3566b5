// tb_mstc3d_awgn: error-rate workload of the full-size codec (mstc3d_top with
// its default parameters: (2048, 256, 8) duobinary frames, h = 32, HES with
// 10 iterations) over a QPSK/AWGN channel.
// For each run, random 4096-bit frames go through the RTL encoder;
// each sent bit b becomes x = 2b - 1 plus Gaussian noise (Box-Muller) of
// variance 1/(2 R Eb/N0) with R = 1/2, and is quantised to the 6-bit channel
// LLR round(S * y), clipped to +-31 (max-log-MAP only needs LLRs up to a
// common scale). Punctured parity bits are loaded as 0. Frames are encoded,
// loaded and decoded one after the other.
// Runs 0-2 use the default HES schedule and h = 32 at 0.6, 1.0 and 1.45 dB.
// Run 3 repeats 1.0 dB with the plain ES schedule, runs 4 and 5 use ES at
// 1.45 dB with the regular period h = 3 and the lighter h = 64 (the schedule
// and period are run-time inputs of the same build).
// The first point (0.6 dB) lies below the convergence threshold of the code
// and is only reported. Checks on runs 0-2: the decoded BER does not grow
// with Eb/N0; at 1.0 dB at most half of the frames are in error and the
// decoded BER is below a fifth of the uncoded one (hard decisions on the
// systematic LLRs); at 1.45 dB at most a quarter of the frames are in error and the BER is
// below 1e-3. The source reports a frame error rate below 1e-6 at 1.45 dB
// for its floating-point decoder and optimised interleavers; with the
// example interleavers of this design a few frames per hundred keep 2 to 6
// bit errors there (an error floor), so these limits are much looser.
// Comparisons: HES has at most 1.25 times the bit errors of ES at 1.0 dB
// (the hybrid schedule should be at least as good with fewer subiterations);
// h = 3 has more than ten times the bit errors of h = 64 at 1.45 dB (the
// regular code converges at a higher Eb/N0), and h = 64 stays below BER 1e-3.
// A second codec instance built with NIT = 8 decodes the same channel
// values in parallel: J = 20 subiterations with HES, the budget at which the
// source compares codes at equal complexity (24 with ES). Its BER and FER are
// printed for every run; at 1.45 dB (HES) it must meet the same limits as
// the default decoder.
// Each frame must also be decoded in J*(2M+4)+M+1 cycles (J = 25 HES, 30 ES;
// 20 and 24 for the second instance).
// BER and FER are printed.
// The channel model, quantisation scale and pass limits are this test's own.
module tb_mstc3d_awgn;
  import mstc_pkg::*;
  import tb_mstc_ref_pkg::*;
  localparam int M = 256, P = 8;
  localparam int NPT = 6, NFR = 20;                    // runs, frames per run
  localparam real EBN0_DB [NPT] = '{0.6, 1.0, 1.45, 1.0, 1.45, 1.45};
  localparam bit  HYB     [NPT] = '{1, 1, 1, 0, 0, 0};   // HES or ES
  localparam int  HP      [NPT] = '{32, 32, 32, 32, 3, 64};
  localparam real S = 10.0;                            // LLR scale
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, hybrid = 1;
  logic [7:0] punct_h = 8'd32;
  logic enc_in_valid = 0, enc_start = 0;
  logic [7:0] enc_in_addr = 0;
  logic [P-1:0][1:0] enc_in_sym = '0;
  logic enc_busy, enc_out_valid, enc_done;
  logic [1:0] enc_out_dim;
  logic [7:0] enc_out_t;
  logic [P-1:0] enc_out_par, enc_out_keep;
  logic [P-1:0][1:0] enc_out_sys;
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

  // second decoder built for 8 iterations (J = 20 with HES, 24 with ES), fed
  // the same channel values at the same time
  logic ld_ready8, dec_valid8, frame_done8, sub_start8;
  logic [7:0] dec_addr8;
  logic [P-1:0][1:0] dec_sym8;
  mstc3d_top #(.NIT(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .cfg1(DEF_ILV1), .cfg2(DEF_ILV2), .punct_h(punct_h),
    .enc_in_valid(1'b0), .enc_in_addr(8'd0), .enc_in_sym('0), .enc_start(1'b0),
    .enc_busy(), .enc_out_valid(), .enc_out_dim(), .enc_out_t(), .enc_out_par(),
    .enc_out_keep(), .enc_out_sys(), .enc_done(),
    .hybrid(hybrid), .ld_ready(ld_ready8), .ld_valid(ld_valid), .ld_last(ld_last),
    .ld_addr(ld_addr), .ld_sys(ld_sys), .ld_par(ld_par), .dec_busy(),
    .sub_start(sub_start8), .sub_dim(), .dec_valid(dec_valid8), .dec_addr(dec_addr8),
    .dec_sym(dec_sym8), .frame_done(frame_done8)
  );

  initial begin
    repeat (NPT * NFR * 17000 + 1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] frame [M*P];
  logic       rx_par  [3][M*P];
  logic       rx_keep [3][M*P];

  always @(posedge clk) if (rst_n && enc_out_valid)
    for (int r = 0; r < P; r++) begin
      rx_par[enc_out_dim][r * M + int'(enc_out_t)]  <= enc_out_par[r];
      rx_keep[enc_out_dim][r * M + int'(enc_out_t)] <= enc_out_keep[r];
    end

  // decoded bit errors of the current frame
  int ferr;
  always @(posedge clk) if (rst_n && dec_valid)
    for (int r = 0; r < P; r++) begin
      logic [1:0] e;
      e = dec_sym[r] ^ frame[r * M + int'(dec_addr)];
      ferr += int'(e[0]) + int'(e[1]);
    end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic logic signed [W_CH-1:0] chan(input logic b, input real sigma, inout int hard_err);
    real y;
    int q;
    y = (b ? 1.0 : -1.0) + sigma * gauss();
    q = $rtoi(S * y + ((y >= 0.0) ? 0.5 : -0.5));
    if (q > 31) q = 31;
    if (q < -31) q = -31;
    if ((q > 0) != b) hard_err++;
    return W_CH'(q);
  endfunction

  int cyc, t0, t0_8, t1_8, ferr8;
  logic first_sub = 1'b1, first_sub8 = 1'b1, done8 = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sub_start && first_sub) begin t0 <= cyc; first_sub <= 1'b0; end
    if (rst_n && sub_start8 && first_sub8) begin t0_8 <= cyc; first_sub8 <= 1'b0; end
    if (rst_n && frame_done8) begin t1_8 <= cyc; done8 <= 1'b1; end
    if (rst_n && dec_valid8)
      for (int r = 0; r < P; r++) begin
        logic [1:0] e;
        e = dec_sym8[r] ^ frame[r * M + int'(dec_addr8)];
        ferr8 += int'(e[0]) + int'(e[1]);
      end
  end

  initial begin
    real ber [NPT];
    int  fer [NPT], be [NPT], fer8 [NPT], be8 [NPT];
    cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pt = 0; pt < NPT; pt++) begin
      real sigma;
      int bit_err, raw_err, dummy;
      sigma = $sqrt(1.0 / (10.0 ** (EBN0_DB[pt] / 10.0)));   // 1/(2 R Eb/N0), R = 1/2
      bit_err = 0; raw_err = 0; fer[pt] = 0; fer8[pt] = 0; be8[pt] = 0;
      hybrid = HYB[pt];
      punct_h = 8'(HP[pt]);
      for (int f = 0; f < NFR; f++) begin
        for (int i = 0; i < M * P; i++) frame[i] = 2'($urandom);
        for (int a = 0; a < M; a++) begin
          @(negedge clk);
          enc_in_valid = 1; enc_in_addr = 8'(a);
          for (int r = 0; r < P; r++) enc_in_sym[r] = frame[r * M + a];
        end
        @(negedge clk) enc_in_valid = 0; enc_start = 1;
        @(negedge clk) enc_start = 0;
        while (!enc_done) @(negedge clk);
        @(negedge clk);
        for (int a = 0; a < M; a++) begin
          @(negedge clk);
          while (!(ld_ready && ld_ready8)) @(negedge clk);
          ld_valid = 1; ld_addr = 8'(a); ld_last = (a == M - 1);
          for (int r = 0; r < P; r++) begin
            int k;
            logic signed [W_CH-1:0] v;
            k = r * M + a;
            v = chan(frame[k][1], sigma, raw_err); ld_sys[r].la = v;
            v = chan(frame[k][0], sigma, raw_err); ld_sys[r].lb = v;
            for (int d = 0; d < 3; d++) begin
              dummy = 0;
              v = chan(rx_par[d][k], sigma, dummy);
              ld_par[r][d] = rx_keep[d][k] ? v : '0;
            end
          end
        end
        @(negedge clk) ld_valid = 0; ld_last = 0;
        ferr = 0; ferr8 = 0;
        while (!frame_done) @(negedge clk);
        checks++;
        if (cyc - t0 != (HYB[pt] ? 25 : 30) * (2 * M + 4) + M + 1) begin
          failures++; $display("frame decoded in %0d cycles", cyc - t0);
        end
        @(negedge clk);
        checks++;
        if (!done8 || t1_8 - t0_8 != (HYB[pt] ? 20 : 24) * (2 * M + 4) + M + 1) begin
          failures++; $display("8-iteration decoder: done %0d after %0d cycles", done8, t1_8 - t0_8);
        end
        be8[pt] += ferr8;
        if (ferr8 != 0) fer8[pt]++;
        first_sub = 1'b1; first_sub8 = 1'b1; done8 = 1'b0;
        bit_err += ferr;
        if (ferr != 0) fer[pt]++;
      end
      ber[pt] = real'(bit_err) / real'(NFR * 2 * M * P);
      be[pt] = bit_err;
      $display("%s h = %2d, Eb/N0 %4.2f dB: channel BER %8.2e, decoded BER %8.2e (%0d bits), FER %0d/%0d",
               HYB[pt] ? "HES" : "ES ", HP[pt], EBN0_DB[pt], real'(raw_err) / real'(NFR * 2 * M * P), ber[pt], bit_err, fer[pt], NFR);
      $display("    8 iterations (J = %0d): decoded BER %8.2e (%0d bits), FER %0d/%0d",
               HYB[pt] ? 20 : 24, real'(be8[pt]) / real'(NFR * 2 * M * P), be8[pt], fer8[pt], NFR);
      checks++;
      if (pt > 0 && pt < 3 && ber[pt] > ber[pt - 1]) failures++;
      if (pt > 0 && pt < 3) begin
        checks++;
        if (pt == NPT - 1) begin
          if (fer[pt] > NFR / 4 || ber[pt] >= 1e-3) failures++;
        end else begin
          if (fer[pt] > NFR / 2 || 5 * bit_err >= raw_err) failures++;
        end
      end
    end
    // 8 iterations, HES (J = 20) at 1.45 dB
    checks++;
    if (fer8[2] > NFR / 4 || be8[2] * 1000 >= NFR * 2 * M * P) failures++;
    // HES against ES at 1.0 dB (same h = 32)
    checks++;
    if (4 * be[1] > 5 * be[3]) failures++;
    // regular h = 3 converges later than h = 64 (both ES, 1.45 dB)
    checks++;
    if (be[4] <= 10 * be[5] + 10 || ber[5] >= 1e-3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
