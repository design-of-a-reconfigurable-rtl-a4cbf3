// Testbench of fp_pack: integer pass-through and the priority of special
// value, cancellation zero, overflow, underflow and the normal case.
module tb_fp_pack;
  import rfpu_pkg::*;
  logic         isfp, zero, sign, zsign, of, uf;
  logic [255:0] iv, o;
  fp_special_t  sp;
  logic [7:0]   e;
  logic [22:0]  frac;
  fp_pack dut (.is_fp_i(isfp), .int_i(iv), .special_i(sp), .zero_i(zero), .sign_i(sign),
               .zero_sign_i(zsign), .e_i(e), .frac_i(frac), .of_i(of), .uf_i(uf), .o_o(o));
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
      logic [31:0] f;
      for (int i = 0; i < 8; i++) iv[32*i +: 32] = $urandom;
      isfp = $urandom; sp.hit = ($urandom_range(0, 3) == 0); sp.value = $urandom;
      zero = ($urandom_range(0, 3) == 0); of = ($urandom_range(0, 3) == 0); uf = ($urandom_range(0, 3) == 0);
      sign = $urandom; zsign = $urandom; e = $urandom; frac = $urandom;
      #1;
      f = sp.hit ? sp.value : zero ? {zsign, 31'h0} : of ? {sign, 8'hFF, 23'h0} : uf ? {sign, 31'h0} : {sign, e, frac};
      if (!isfp) chk(o == iv, "integer");
      else chk(o == {224'h0, f}, "fp");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
