// Testbench of amm8: random and corner operands, unsigned and signed; the
// carry-save pair must add up to A*B + C + W modulo 2^16.
module tb_amm8;
  logic [7:0]  a, b, c;
  logic [15:0] w, s, cy;
  logic        sgn;
  int checks = 0, failures = 0;
  amm8 dut (.a_i(a), .b_i(b), .c_i(c), .w_i(w), .sgn_i(sgn), .sum_o(s), .carry_o(cy));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 4000; n++) begin
      int pa, pb;
      logic [15:0] expv;
      a = $urandom; b = $urandom; c = $urandom; w = $urandom; sgn = n[0];
      if (n < 8) begin a = 8'hFF; b = 8'hFF; c = 8'hFF; w = n[1] ? 16'h00FF : 16'hFFFF; end
      if (n % 3 == 0) begin c = 0; w = 0; end
      pa = sgn ? int'($signed(a)) : int'(a);
      pb = sgn ? int'($signed(b)) : int'(b);
      #1;
      expv = 16'(pa * pb + int'(c) + int'(w));
      checks++;
      if (16'(s + cy) !== expv) begin
        failures++;
        if (failures < 5) $display("a=%h b=%h c=%h w=%h sgn=%0b got=%h exp=%h", a, b, c, w, sgn, 16'(s + cy), expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
