// tb_mstc_addr_gen: checks the interleaver address generator against the
// closed formula (frame size 2048 = 256 x 8, example configuration), and
// that the resulting permutations are bijections whose P consecutive
// symbols of a slice come from P different banks.
module tb_mstc_addr_gen;
  import mstc_pkg::*;
  import tb_mstc_ref_pkg::*;
  localparam int M = 256, P = 8;

  logic [1:0] dim;
  logic [7:0] t;
  logic [7:0] addr;
  logic [2:0] rot;
  logic       swap;
  int checks = 0, failures = 0;

  mstc_addr_gen #(.M(M), .P(P)) dut (
    .dim(dim), .t(t), .cfg1(DEF_ILV1), .cfg2(DEF_ILV2), .addr(addr), .rot(rot), .swap(swap)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [M*P];
    for (int d = 0; d < 3; d++) begin
      foreach (seen[i]) seen[i] = 0;
      for (int tt = 0; tt < M; tt++) begin
        dim = 2'(d); t = 8'(tt);
        #1;
        for (int r = 0; r < P; r++) begin
          int nat, got;
          nat = ref_pi(d, r * M + tt, M, P, (d == 2) ? DEF_ILV2 : DEF_ILV1);
          got = ((int'(rot) + r) % P) * M + int'(addr);
          checks++;
          if (nat != got) begin
            failures++;
            if (failures < 10) $display("dim %0d t %0d r %0d: got %0d expected %0d", d, tt, r, got, nat);
          end
          if (seen[got]) failures++;
          seen[got] = 1;
        end
        checks++;
        if (swap != ref_swap(d, tt)) failures++;
      end
      // P consecutive symbols of a slice come from P distinct banks
      for (int r = 0; r < P; r++)
        for (int t0 = 0; t0 + P <= M; t0 += P) begin
          bit [P-1:0] banks;
          banks = '0;
          for (int i = 0; i < P; i++) banks[ref_pi(d, r * M + t0 + i, M, P, (d == 2) ? DEF_ILV2 : DEF_ILV1) / M] = 1'b1;
          checks++;
          if (d != 0 && banks != '1) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
