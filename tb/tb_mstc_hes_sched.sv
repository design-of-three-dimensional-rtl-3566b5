// tb_mstc_hes_sched: runs the subiteration sequencer in hybrid (HES) and
// plain (ES) mode with 10 iterations and checks the dimension order, the
// subiteration count (25 and 30), the scaling factors, and that every
// subiteration reads exactly the extrinsic of the other dimensions
// available and never overwrites one it still needs.
// A second sequencer built with 8 iterations runs on the same stimulus: in
// HES mode it gives J = 20, the constant-complexity budget at which the
// hybrid schedule is compared with 2D codes, with third-dimension scaling
// 3, 7, 12, 16 (0.2..1 in four steps); in ES mode J = 24.
module tb_mstc_hes_sched;
  import mstc_pkg::*;
  localparam int NIT = 10;

  logic clk = 0, rst_n = 0, start = 0, hybrid = 1, sub_done = 0;
  logic busy, cmd_valid, cmd_wr_sel, cmd_last, done;
  logic [1:0] cmd_dim, cmd_rd_use;
  logic [3:0] cmd_it;
  logic [W_SF-1:0] cmd_scale;
  int checks = 0, failures = 0;

  mstc_hes_sched #(.NIT(NIT)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .hybrid(hybrid), .busy(busy),
    .cmd_valid(cmd_valid), .cmd_dim(cmd_dim), .cmd_it(cmd_it), .cmd_scale(cmd_scale),
    .cmd_rd_use(cmd_rd_use), .cmd_wr_sel(cmd_wr_sel), .cmd_last(cmd_last),
    .sub_done(sub_done), .done(done)
  );
  always #5 clk = ~clk;

  logic busy8, cv8, wr8, last8, done8;
  logic [1:0] dim8, rd8;
  logic [3:0] it8;
  logic [W_SF-1:0] sc8;
  int j8, n3_8, bad8;
  mstc_hes_sched #(.NIT(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .start(start), .hybrid(hybrid), .busy(busy8),
    .cmd_valid(cv8), .cmd_dim(dim8), .cmd_it(it8), .cmd_scale(sc8),
    .cmd_rd_use(rd8), .cmd_wr_sel(wr8), .cmd_last(last8),
    .sub_done(sub_done), .done(done8)
  );
  always @(posedge clk) if (rst_n) begin
    if (start) begin
      j8 <= 0; n3_8 <= 0;
    end else if (sub_done && busy8 && cv8) begin
      int e8 [4] = '{3, 7, 12, 16};
      j8 <= j8 + 1;
      if (dim8 == 2'd2) begin
        n3_8 <= n3_8 + 1;
        if (hybrid && (it8 < 4'd4 || int'(sc8) != e8[int'(it8) - 4])) bad8 <= bad8 + 1;
      end
    end
  end

  task automatic check8(input int expect_j, input int expect_n3);
    checks++;
    if (j8 != expect_j || n3_8 != expect_n3 || bad8 != 0 || busy8) begin
      failures++;
      $display("FAIL: 8-iteration sequencer J = %0d, third dimension %0d, bad scaling %0d", j8, n3_8, bad8);
    end else $display("8 iterations: J = %0d", j8);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (dim %0d it %0d)", what, cmd_dim, cmd_it); end
  endtask

  task automatic run(input bit hyb, input int expect_j);
    int memdim [2];      // dimension held by each memory, -1 = none
    bit decoded [3];
    int j, last_it;
    int exp_dims [$];
    // expected sequence
    for (int it = 0; it < NIT; it++) begin
      exp_dims.push_back(0); exp_dims.push_back(1);
      if (!hyb || it >= NIT / 2) exp_dims.push_back(2);
    end
    memdim = '{-1, -1};
    decoded = '{0, 0, 0};
    hybrid = hyb;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    j = 0;
    while (1) begin
      int d, nother;
      check(cmd_valid, "command valid");
      d = int'(cmd_dim);
      check(j < exp_dims.size() && d == exp_dims[j], "dimension order");
      // scaling
      if (d == 2 && hyb) begin
        int e [5] = '{3, 6, 10, 13, 16};
        check(int'(cmd_scale) == e[int'(cmd_it) - NIT / 2], "third dimension scaling 0.2..1");
      end else begin
        check(int'(cmd_scale) == ((int'(cmd_it) == 0) ? 11 : (int'(cmd_it) == NIT - 1) ? 16 : int'(cmd_scale)), "scaling 0.7..1");
        check(int'(cmd_scale) >= 11 && int'(cmd_scale) <= 16, "scaling range");
      end
      // reads: exactly the memories holding another dimension
      nother = 0;
      for (int m = 0; m < 2; m++) begin
        check(cmd_rd_use[m] == (memdim[m] >= 0 && memdim[m] != d), "read selection");
        if (cmd_rd_use[m]) nother++;
      end
      // every other dimension decoded before in this frame is still stored and read
      for (int e = 0; e < 3; e++)
        if (e != d && decoded[e]) check((cmd_rd_use[0] && memdim[0] == e) || (cmd_rd_use[1] && memdim[1] == e),
                                        "extrinsic of every other dimension available");
      decoded[d] = 1'b1;
      memdim[cmd_wr_sel] = d;
      check(cmd_last == (j == expect_j - 1), "last flag");
      @(negedge clk) sub_done = 1;
      @(negedge clk) sub_done = 0;
      j++;
      if (!busy) break;
    end
    check(j == expect_j, "number of subiterations J");
    $display("mode %s: J = %0d", hyb ? "HES" : "ES", j);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    bad8 = 0;
    run(1'b1, 25);
    check8(20, 4);
    run(1'b0, 30);
    check8(24, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
