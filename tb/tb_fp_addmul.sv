// Testbench of fp_addmul: checks the operands handed to the array adder and
// the common 48-bit format built from an addition or a product.
module tb_fp_addmul;
  logic        fmul, effsub, amsub;
  logic [26:0] x, y;
  logic [31:0] ama, amb;
  logic [32:0] amres;
  logic [47:0] prod, sig;
  logic [7:0]  ebig;
  logic signed [9:0] emul, e;
  fp_addmul dut (.fmul_i(fmul), .x_i(x), .y_i(y), .eff_sub_i(effsub), .am_a_o(ama), .am_b_o(amb),
                 .am_sub_o(amsub), .am_res_i(amres), .prod_i(prod), .ebig_i(ebig), .emul_i(emul),
                 .sig_o(sig), .e_o(e));
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
    for (int n = 0; n < 2000; n++) begin
      fmul = $urandom; effsub = $urandom; x = $urandom; y = $urandom;
      amres = {$urandom, $urandom}; prod = {$urandom, $urandom}; ebig = $urandom; emul = $urandom;
      #1;
      chk(ama == 32'(x) && amb == 32'(y) && amsub == effsub, "array operands");
      if (fmul) chk(sig == prod && e == emul, "mul format");
      else chk(sig == 48'(amres[27:0]) * 48'h100000 && int'(e) == int'(ebig), "add format");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
