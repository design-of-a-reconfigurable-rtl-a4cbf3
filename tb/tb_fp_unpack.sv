// Testbench of fp_unpack: random instruction words and operands, with
// zeros, denormals, infinities and NaNs mixed in; checks the decoded
// configuration, the operand fields (B's sign inverted for subtraction) and
// the special-case results.
module tb_fp_unpack;
  import rfpu_pkg::*;
  inst_t       inst;
  logic [31:0] a, b;
  cfg_e        cfg;
  logic        is_fp, fmul;
  fp_opnd_t    ua, ub;
  fp_special_t sp;
  fp_unpack dut (.inst_i(inst), .a_i(a), .b_i(b), .cfg_o(cfg), .is_fp_o(is_fp), .fmul_o(fmul),
                 .ua_o(ua), .ub_o(ub), .special_o(sp));
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
  function automatic logic [31:0] pick();
    logic [31:0] v = $urandom;
    case ($urandom_range(0, 5))
      0: v[30:23] = 8'h00;
      1: v[30:0] = {8'hFF, 23'h0};
      2: v[30:23] = 8'hFF;
      default: ;
    endcase
    return v;
  endfunction
  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [3:0] ecfg;
      logic isnan_a, isnan_b, isinf_a, isinf_b, isz_a, isz_b, sb;
      inst = inst_t'(6'($urandom)); a = pick(); b = pick();
      #1;
      ecfg = (inst.mode == 2'b11) ? 4'd9 : (inst.mode != 2'b00) ? 4'd8 : {1'b0, inst.mul, inst.size};
      chk(cfg == cfg_e'(ecfg) && is_fp == (inst.mode != 0) && fmul == (inst.mode == 3), "decode");
      sb = b[31] ^ (inst.mode == 2'b10);
      chk(ua.s == a[31] && ub.s == sb && ua.e == a[30:23] && ub.e == b[30:23], "fields");
      chk(ua.m == ((a[30:23] == 0) ? 24'h0 : {1'b1, a[22:0]}) && ub.m == ((b[30:23] == 0) ? 24'h0 : {1'b1, b[22:0]}), "significand");
      isnan_a = a[30:23] == 8'hFF && a[22:0] != 0; isnan_b = b[30:23] == 8'hFF && b[22:0] != 0;
      isinf_a = a[30:0] == {8'hFF, 23'h0};        isinf_b = b[30:0] == {8'hFF, 23'h0};
      isz_a = a[30:23] == 0;                        isz_b = b[30:23] == 0;
      if (inst.mode == 2'b11) begin
        if (isnan_a || isnan_b || (isinf_a && isz_b) || (isinf_b && isz_a)) chk(sp.hit && sp.value == 32'h7FC00000, "mul nan");
        else if (isinf_a || isinf_b) chk(sp.hit && sp.value == {a[31] ^ b[31], 8'hFF, 23'h0}, "mul inf");
        else if (isz_a || isz_b) chk(sp.hit && sp.value == {a[31] ^ b[31], 31'h0}, "mul zero");
        else chk(!sp.hit, "mul none");
      end else if (inst.mode != 0) begin
        if (isnan_a || isnan_b || (isinf_a && isinf_b && a[31] != sb)) chk(sp.hit && sp.value == 32'h7FC00000, "add nan");
        else if (isinf_a) chk(sp.hit && sp.value == {a[31], 8'hFF, 23'h0}, "add inf a");
        else if (isinf_b) chk(sp.hit && sp.value == {sb, 8'hFF, 23'h0}, "add inf b");
        else chk(!sp.hit, "add none");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
