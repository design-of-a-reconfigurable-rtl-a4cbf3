// Testbench of fp_round_shift: random significands with every guard/sticky/
// last-bit combination, and all-ones significands that carry out; the
// array's sum is modelled in the testbench.
module tb_fp_round_shift;
  logic [23:0] m;
  logic        g, st, ovf;
  logic [31:0] ra, rb;
  logic [32:0] rres;
  logic [22:0] frac;
  fp_round_shift dut (.m_i(m), .g_i(g), .st_i(st), .rnd_a_o(ra), .rnd_b_o(rb), .rnd_res_i(rres),
                      .frac_o(frac), .ovf_o(ovf));
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
      logic up;
      logic [24:0] sum;
      m = {1'b1, 23'($urandom)};
      if (n % 10 == 0) m = 24'hFFFFFF;
      {g, st} = 2'($urandom);
      #1;
      up  = g && (st || m[0]);
      chk(ra == 32'(m) && rb == 32'(up), "increment");
      sum = 25'(m) + 25'(up);
      rres = {1'b0, 32'(sum)};
      #1;
      if (sum[24]) chk(ovf && frac == 23'h0, "carry out");
      else chk(!ovf && frac == sum[22:0], "no carry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
