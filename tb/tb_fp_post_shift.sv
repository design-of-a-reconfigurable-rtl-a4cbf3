// Testbench of fp_post_shift: significands with the leading one at every
// position (and zero); checks the normalized significand, guard and sticky
// bits and the corrected exponent.
module tb_fp_post_shift;
  logic [47:0] sig;
  logic signed [9:0] ei, eo;
  logic [23:0] m;
  logic        g, st, zero;
  fp_post_shift dut (.sig_i(sig), .e_i(ei), .m_o(m), .g_o(g), .st_o(st), .e_o(eo), .zero_o(zero));
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
      int          top;
      logic [95:0] wide;
      top = n % 49 - 1;   // -1 means zero
      sig = {$urandom, $urandom};
      if (top < 0) sig = 0;
      else begin
        sig = sig & ((48'h1 << top) - 1);
        sig[top] = 1'b1;
      end
      ei = 10'($urandom_range(0, 300));
      #1;
      if (top < 0) chk(zero, "zero");
      else begin
        wide = {sig, 48'h0} << (47 - top);
        chk(!zero && m == wide[95:72] && g == wide[71] && st == |wide[70:0], "normalize");
        chk(int'(eo) == int'(ei) + top - 46, "exponent");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
