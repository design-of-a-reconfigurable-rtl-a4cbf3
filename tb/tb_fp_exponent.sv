// Testbench of fp_exponent: random exponent pairs; difference, larger
// exponent and product exponent against integer arithmetic.
module tb_fp_exponent;
  logic [7:0] ea, eb, ebig;
  logic signed [9:0] diff, emul;
  fp_exponent dut (.ea_i(ea), .eb_i(eb), .diff_o(diff), .ebig_o(ebig), .emul_o(emul));
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
    for (int n = 0; n < 3000; n++) begin
      ea = $urandom; eb = (n % 5 == 0) ? ea : 8'($urandom);
      #1;
      chk(int'(diff) == int'(ea) - int'(eb), "diff");
      chk(ebig == ((ea > eb) ? ea : eb), "ebig");
      chk(int'(emul) == int'(ea) + int'(eb) - 127, "emul");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
