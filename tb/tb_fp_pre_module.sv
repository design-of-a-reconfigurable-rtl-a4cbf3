// Testbench of fp_pre_module: random significands and exponent differences
// (equal, lesser, large, beyond the width); checks the operand order, the
// effective operation and the aligned 27-bit Y with its sticky bit against a
// wide shift done in the testbench.
module tb_fp_pre_module;
  logic [23:0] ma, mb;
  logic        sa, sb, ge, swap, effsub;
  logic signed [9:0] diff;
  logic [26:0] x, y;
  fp_pre_module dut (.ma_i(ma), .mb_i(mb), .sa_i(sa), .sb_i(sb), .diff_i(diff), .cmp_ge_i(ge),
                     .x_o(x), .y_o(y), .swap_o(swap), .eff_sub_o(effsub));
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
    for (int n = 0; n < 4000; n++) begin
      logic        eswap;
      logic [23:0] big, lesser;
      logic [127:0] t;
      int           d;
      ma = {1'b1, 23'($urandom)}; mb = {1'b1, 23'($urandom)};
      sa = $urandom; sb = $urandom;
      d = (n % 4 == 0) ? 0 : $urandom_range(0, 60) - 30;
      diff = 10'(d);
      ge = (ma >= mb);
      #1;
      eswap = (d < 0) || (d == 0 && ma < mb);
      big   = eswap ? mb : ma;
      lesser = eswap ? ma : mb;
      t = {lesser, 104'h0} >> ((d < 0) ? -d : d);
      chk(swap == eswap && effsub == (sa ^ sb), "order");
      chk(x == {big, 3'b000}, "x");
      chk(y == {t[127:102], |t[101:0]}, "y aligned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
