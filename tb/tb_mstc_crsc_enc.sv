// tb_mstc_crsc_enc: encodes random slices with the circular encoder (two
// passes) and compares the parity with a reference that finds the circular
// start state by exhaustive search; also checks that the slice ends in the
// state it started from.
module tb_mstc_crsc_enc;
  import tb_mstc_ref_pkg::*;
  localparam int M = 256;
  logic clk = 0, rst_n = 0, clear = 0, load_circ = 0, en = 0, a = 0, b = 0, y;
  logic [2:0] state;
  int checks = 0, failures = 0;

  mstc_crsc_enc #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .clear(clear), .load_circ(load_circ),
                              .en(en), .a(a), .b(b), .y(y), .state(state));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] sl [];
    logic [2:0] s, sc;
    logic [3:0] r;
    sl = new[M];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      foreach (sl[i]) sl[i] = 2'($urandom);
      sc = ref_circ(sl, M);
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int t = 0; t < M; t++) begin
        en = 1; {a, b} = sl[t];
        @(negedge clk);
      end
      en = 0; load_circ = 1;
      @(negedge clk) load_circ = 0;
      checks++;
      if (state != sc) begin failures++; $display("circulation state %0d, expected %0d", state, sc); end
      s = sc;
      for (int t = 0; t < M; t++) begin
        en = 1; {a, b} = sl[t];
        r = ref_step(s, sl[t][1], sl[t][0]);
        #1;
        checks++;
        if (y != r[3]) failures++;
        s = r[2:0];
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (state != sc) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
