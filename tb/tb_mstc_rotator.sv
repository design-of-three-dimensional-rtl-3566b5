// tb_mstc_rotator: checks both directions of the barrel shifter on random
// data and amounts, and that the inverse undoes the forward rotation.
module tb_mstc_rotator;
  localparam int P = 8, W = 6;
  logic [2:0]          amt;
  logic [P-1:0][W-1:0] din, fwd, back;
  int checks = 0, failures = 0;

  mstc_rotator #(.P(P), .W(W), .INVERSE(1'b0)) u_f (.amt(amt), .din(din), .dout(fwd));
  mstc_rotator #(.P(P), .W(W), .INVERSE(1'b1)) u_i (.amt(amt), .din(fwd), .dout(back));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      amt = 3'($urandom_range(0, P - 1));
      for (int r = 0; r < P; r++) din[r] = W'($urandom);
      #1;
      for (int r = 0; r < P; r++) begin
        checks++;
        if (fwd[r] != din[(int'(amt) + r) % P]) failures++;
        checks++;
        if (back[r] != din[r]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
