// tb_mstc_decoder: decodes frames of 512 symbols (64 x 8, punctured with
// period 32) produced by the reference encoder and sent over a noisy
// channel model.
//   frame 0: clean channel, HES schedule, loaded before decoding starts;
//   frame 1: noisy channel, ES schedule, loaded while frame 0 is decoded
//            (second intrinsic buffer);
//   frame 2: noisy channel, HES, loaded once a buffer is free again.
// Checks the decisions, the number of subiterations per dimension (25 for
// HES: the third dimension only in the last 5 iterations; 30 for ES) and the
// decoding time of J*(2M+4) + M + 1 cycles.
module tb_mstc_decoder;
  import mstc_pkg::*;
  import tb_mstc_ref_pkg::*;
  localparam int M = 64, P = 8, NIT = 10, H = 32;
  localparam int AMP = 12, SD = 7;

  logic clk = 0, rst_n = 0, hybrid = 1;
  logic ld_ready, ld_valid = 0, ld_last = 0;
  logic [5:0] ld_addr = 0;
  sys_llr_t [P-1:0] ld_sys = '0;
  logic [P-1:0][2:0][W_CH-1:0] ld_par = '0;
  logic busy, sub_start, dec_valid, frame_done;
  logic [1:0] sub_dim;
  logic [5:0] dec_addr;
  logic [P-1:0][1:0] dec_sym;
  int checks = 0, failures = 0;

  mstc_decoder #(.M(M), .P(P), .NIT(NIT)) dut (
    .clk(clk), .rst_n(rst_n), .cfg1(DEF_ILV1), .cfg2(DEF_ILV2), .hybrid(hybrid),
    .ld_ready(ld_ready), .ld_valid(ld_valid), .ld_last(ld_last), .ld_addr(ld_addr),
    .ld_sys(ld_sys), .ld_par(ld_par), .busy(busy), .sub_start(sub_start), .sub_dim(sub_dim),
    .dec_valid(dec_valid), .dec_addr(dec_addr), .dec_sym(dec_sym), .frame_done(frame_done)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] frames [3][M*P];
  int raw_err [3];

  task automatic load(input int f, input int sd);
    logic par [3][];
    logic [1:0] fr [];
    logic signed [W_CH-1:0] l [3][];

    for (int i = 0; i < M * P; i++) frames[f][i] = 2'($urandom);
    raw_err[f] = 0;
    fr = new[M * P];
    for (int i = 0; i < M * P; i++) fr[i] = frames[f][i];
    for (int d = 0; d < 3; d++) ref_encode(fr, d, M, P, DEF_ILV1, DEF_ILV2, par[d]);
    for (int a = 0; a < M; a++) begin
      @(negedge clk);
      while (!ld_ready) @(negedge clk);
      ld_valid = 1; ld_addr = 6'(a); ld_last = (a == M - 1);
      for (int r = 0; r < P; r++) begin
        int k;
        k = r * M + a;
        begin
          logic signed [W_CH-1:0] va, vb;
          va = ref_llr(frames[f][k][1], AMP, sd);
          vb = ref_llr(frames[f][k][0], AMP, sd);
          ld_sys[r].la = va;
          ld_sys[r].lb = vb;
        end
        if ((ld_sys[r].la > 0) != frames[f][k][1] || (ld_sys[r].lb > 0) != frames[f][k][0]) raw_err[f]++;
        for (int d = 0; d < 3; d++) begin
          logic signed [W_CH-1:0] v;
          v = ref_llr(par[d][k], AMP, sd);
          ld_par[r][d] = punct_keep(2'(d), 8'(H), 16'(k)) ? v : '0;
        end
      end
    end
    @(negedge clk) ld_valid = 0; ld_last = 0;
  endtask

  // output checker
  int fout, nerr;
  always @(posedge clk) if (rst_n && dec_valid) begin
    for (int r = 0; r < P; r++) begin
      checks++;
      if (dec_sym[r] != frames[fout][r * M + int'(dec_addr)]) nerr++;
    end
  end

  int cyc, fdone, fstart [3];
  int nsubs [3][3];
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (sub_start) begin
      if (nsubs[fdone][0] + nsubs[fdone][1] + nsubs[fdone][2] == 0) fstart[fdone] <= cyc;
      nsubs[fdone][sub_dim] <= nsubs[fdone][sub_dim] + 1;
    end
    if (frame_done) fdone <= fdone + 1;
  end

  initial begin
    cyc = 0; fdone = 0; fout = 0;
    foreach (nsubs[i, j]) nsubs[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        load(0, 0);
        load(1, SD);
        load(2, SD);
      end
      begin
        for (int f = 0; f < 3; f++) begin
          int j;
          nerr = 0;
          while (fdone == f && nsubs[f][0] == 0) @(negedge clk);
          hybrid = (f != 0);            // frame 0 has latched HES; frame 1 will run ES
          while (!frame_done) @(negedge clk);
          j = nsubs[f][0] + nsubs[f][1] + nsubs[f][2];
          checks++;
          if (j != ((f == 1) ? 30 : 25) || nsubs[f][2] != ((f == 1) ? 10 : 5)) begin
            failures++; $display("frame %0d: %0d/%0d/%0d subiterations", f, nsubs[f][0], nsubs[f][1], nsubs[f][2]);
          end
          checks++;
          if (cyc - fstart[f] != j * (2 * M + 4) + M + 1) begin
            failures++; $display("frame %0d took %0d cycles", f, cyc - fstart[f]);
          end
          failures += nerr;
          $display("frame %0d: %0d channel errors, %0d decoded symbol errors", f, raw_err[f], nerr);
          @(negedge clk);
          hybrid = 1'b1;
          fout++;
        end
      end
    join
    checks++;
    if (raw_err[1] == 0 && raw_err[2] == 0) failures++;   // the channel must have been noisy
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
