// tb_mstc_siso: decodes random circular slices of 256 symbols.
//   1. clean channel: every decision must equal the sent symbol;
//   2. systematic values erased on every fourth symbol (t mod 4 = 2): decisions still
//      correct, and the extrinsic value (parity information only) must
//      single out the sent symbol on every erased position;
//   3. no channel information, a priori only: decisions follow the a priori;
//   4. noisy channel, restarted from the boundary metrics of the previous
//      decoding: decisions correct.
// Also checks the output order (t descending), count and the 2*M+2 latency.
module tb_mstc_siso;
  import mstc_pkg::*;
  import tb_mstc_ref_pkg::*;
  localparam int M = 256;


  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  smv_t ainit = '0, binit = '0, afin, bfin;
  logic in_ready, out_valid, done;
  logic signed [W_CH-1:0] la = 0, lb = 0, lp = 0;
  ext_t apr = '0, oext;
  logic [7:0] ot;
  logic [1:0] ohard;
  int checks = 0, failures = 0;

  mstc_siso #(.M(M)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .alpha_init(ainit), .beta_init(binit),
    .in_ready(in_ready), .in_valid(in_valid), .in_la(la), .in_lb(lb), .in_lp(lp), .in_apr(apr),
    .out_valid(out_valid), .out_t(ot), .out_ext(oext), .out_hard(ohard),
    .alpha_final(afin), .beta_final(bfin), .done(done)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] sl [];
  logic       par [];
  int         mode;       // which test
  int         nout, expect_t;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (int'(ot) != expect_t) begin failures++; if (failures < 5) $display("order: t %0d expected %0d", ot, expect_t); end
    expect_t--;
    nout++;
    checks++;
    if (ohard != sl[ot]) begin
      failures++;
      if (failures < 10) $display("mode %0d t %0d hard %0d expected %0d", mode, ot, ohard, sl[ot]);
    end
    if (mode == 2 && ot % 4 == 2) begin
      checks++;
      if (sl[ot] == 2'd0) begin
        if (!(oext[0] < 0 && oext[1] < 0 && oext[2] < 0)) begin failures++; $display("ext0 t %0d %0d %0d %0d", ot, oext[0], oext[1], oext[2]); end
      end else begin
        for (int v = 0; v < 3; v++)
          if (v != int'(sl[ot]) - 1 && !(oext[int'(sl[ot]) - 1] > oext[v] && oext[int'(sl[ot]) - 1] > 0)) begin failures++; $display("ext t %0d s %0d %0d %0d %0d", ot, sl[ot], oext[0], oext[1], oext[2]); end
      end
    end
  end

  task automatic run_slice(input int md, input int sd);
    logic [2:0] s;
    logic [3:0] r;
    int cyc;
    mode = md;
    foreach (sl[i]) sl[i] = 2'($urandom);
    s = ref_circ(sl, M);
    for (int t = 0; t < M; t++) begin r = ref_step(s, sl[t][1], sl[t][0]); par[t] = r[3]; s = r[2:0]; end
    nout = 0; expect_t = M - 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    for (int t = 0; t < M; t++) begin
      in_valid = 1;
      case (md)
        3: begin
          la = 0; lb = 0; lp = 0;
          for (int v = 0; v < 3; v++) apr[v] = (v + 1 == int'(sl[t])) ? W_EXT'(40) : (sl[t] == 0 ? W_EXT'(-40) : W_EXT'(0));
        end
        default: begin
          apr = '0;
          la = ref_llr(sl[t][1], 20, sd);
          lb = ref_llr(sl[t][0], 20, sd);
          lp = ref_llr(par[t], 20, sd);
          if (md == 2 && t % 4 == 2) begin la = 0; lb = 0; end
        end
      endcase
      @(negedge clk); cyc++;
    end
    in_valid = 0;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);       // let the checker see the last output
    checks++;
    if (cyc != 2 * M + 2) begin failures++; $display("slice took %0d cycles", cyc); end
    checks++;
    if (nout != M) failures++;
  endtask

  initial begin
    sl = new[M]; par = new[M];
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_slice(1, 0);
    run_slice(2, 0);
    run_slice(3, 0);
    ainit = afin; binit = bfin;
    run_slice(4, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
