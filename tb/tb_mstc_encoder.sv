// tb_mstc_encoder: encodes random frames of 2048 symbols (256 x 8) and
// compares every parity bit of the three dimensions, the keep flags and the
// systematic output with the reference encoder; checks the frame time.
module tb_mstc_encoder;
  import mstc_pkg::*;
  import tb_mstc_ref_pkg::*;
  localparam int M = 256, P = 8, H = 32;
  localparam int FRAME_CYCLES = 6 * (M + 1) + 1;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, start = 0;
  logic [7:0] in_addr = 0;
  logic [P-1:0][1:0] in_sym = '0;
  logic busy, out_valid, done;
  logic [1:0] out_dim;
  logic [7:0] out_t;
  logic [P-1:0] out_par, out_keep;
  logic [P-1:0][1:0] out_sys;
  int checks = 0, failures = 0;

  mstc_encoder #(.M(M), .P(P)) dut (
    .clk(clk), .rst_n(rst_n), .cfg1(DEF_ILV1), .cfg2(DEF_ILV2), .punct_h(8'(H)),
    .in_valid(in_valid), .in_addr(in_addr), .in_sym(in_sym), .start(start), .busy(busy),
    .out_valid(out_valid), .out_dim(out_dim), .out_t(out_t), .out_par(out_par),
    .out_keep(out_keep), .out_sys(out_sys), .done(done)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] frame [];
  logic       par [3][];
  int         nout [3];

  always @(posedge clk) if (rst_n && out_valid) begin
    nout[out_dim]++;
    for (int r = 0; r < P; r++) begin
      int k;
      k = r * M + int'(out_t);
      checks++;
      if (out_par[r] !== par[out_dim][k]) begin
        failures++;
        if (failures < 10) $display("dim %0d k %0d parity %0b expected %0b", out_dim, k, out_par[r], par[out_dim][k]);
      end
      checks++;
      if (out_keep[r] !== punct_keep(out_dim, 8'(H), 16'(k))) failures++;
      if (out_dim == 0) begin
        checks++;
        if (out_sys[r] !== frame[k]) failures++;
      end
    end
  end

  initial begin
    int cyc;
    frame = new[M * P];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2; n++) begin
      foreach (frame[i]) frame[i] = 2'($urandom);
      for (int d = 0; d < 3; d++) ref_encode(frame, d, M, P, DEF_ILV1, DEF_ILV2, par[d]);
      nout = '{0, 0, 0};
      for (int a = 0; a < M; a++) begin
        @(negedge clk);
        in_valid = 1; in_addr = 8'(a);
        for (int r = 0; r < P; r++) in_sym[r] = frame[r * M + a];
      end
      @(negedge clk) in_valid = 0; start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != FRAME_CYCLES) begin failures++; $display("frame took %0d cycles, expected %0d", cyc, FRAME_CYCLES); end
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (nout[d] != M) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
