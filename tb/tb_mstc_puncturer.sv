// tb_mstc_puncturer: checks the puncturing patterns for the periods
// h = 1, 3, 4, 8, 16, 32 and 64 against the written patterns (h = 3, 8) and
// the construction rule, and that exactly one of the three parity bits of
// every symbol is dropped.
module tb_mstc_puncturer;
  localparam int M = 256, P = 8;
  logic [1:0] dim;
  logic [7:0] t;
  int checks = 0, failures = 0;

  logic [7:0] h = 8'd32;
  logic [P-1:0] k;

  mstc_puncturer #(.M(M), .P(P)) dut (.h(h), .dim(dim), .t(t), .keep(k));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string p8 [3] = '{"01111111", "11110111", "10001000"};
    string p3 [3] = '{"011", "101", "110"};
    int hs [7] = '{1, 3, 4, 8, 16, 32, 64};
    logic [P-1:0] kp [3];
    for (int hi = 0; hi < 7; hi++) begin
      h = 8'(hs[hi]);
      for (int tt = 0; tt < M; tt++) begin
        t = 8'(tt);
        for (int d = 0; d < 3; d++) begin
          dim = 2'(d);
          #1;
          kp[d] = k;
          for (int r = 0; r < P; r++) begin
            int j;
            bit e;
            j = r * M + tt;
            case (hs[hi])
              1: e = (d != 2);
              3: e = (p3[d][j % 3] == "1");
              8: e = (p8[d][j % 8] == "1");
              default: e = (d == 0) ? (j % hs[hi] != 0) : (d == 1) ? (j % hs[hi] != hs[hi] / 2)
                                    : (j % hs[hi] == 0 || j % hs[hi] == hs[hi] / 2);
            endcase
            checks++;
            if (k[r] != e) failures++;
          end
        end
        // one parity bit of three dropped per symbol (h > 1); the 2D code drops y3
        for (int r = 0; r < P; r++) begin
          checks++;
          if (32'(kp[0][r]) + 32'(kp[1][r]) + 32'(kp[2][r]) != 2) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
