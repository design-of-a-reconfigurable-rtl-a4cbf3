// Testbench of fp_exp_adj: exponents across and beyond the single range,
// with and without the rounding carry.
module tb_fp_exp_adj;
  logic signed [9:0] ei;
  logic       ovf, of, uf;
  logic [7:0] eo;
  fp_exp_adj dut (.e_i(ei), .ovf_i(ovf), .e_o(eo), .of_o(of), .uf_o(uf));
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
    for (int n = -60; n < 320; n++) begin
      for (int k = 0; k < 2; k++) begin
        ei = 10'(n); ovf = k[0];
        #1;
        chk(of == (n + k >= 255) && uf == (n + k <= 0), "range");
        if (n + k > 0 && n + k < 255) chk(int'(eo) == n + k, "value");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
