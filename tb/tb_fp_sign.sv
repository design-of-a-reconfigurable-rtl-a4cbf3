// Testbench of fp_sign: all input combinations against the IEEE 754 sign
// rules for products, sums and exactly cancelling sums.
module tb_fp_sign;
  logic fmul, sa, sb, swap, sign, zsign;
  fp_sign dut (.fmul_i(fmul), .sa_i(sa), .sb_i(sb), .swap_i(swap), .sign_o(sign), .zero_sign_o(zsign));
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask
  initial begin
    for (int n = 0; n < 16; n++) begin
      {fmul, sa, sb, swap} = 4'(n);
      #1;
      if (fmul) chk(sign == (sa != sb) && zsign == (sa != sb), "mul");
      else chk(sign == (swap ? sb : sa) && zsign == (sa == 1 && sb == 1), "add");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
