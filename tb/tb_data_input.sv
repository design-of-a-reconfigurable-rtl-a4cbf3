// Testbench of data_input: for every configuration, random A/B and FP-side
// operands; checks the slice, operation bit and MAC addend of every cell and
// the sign-correction terms of the additive modules.
module tb_data_input;
  import rfpu_pkg::*;
  cfg_e         cfg;
  logic [255:0] a, b;
  logic         op, am_sub;
  logic [31:0]  cmp_a, cmp_b, am_a, am_b, rnd_a, rnd_b;
  logic [15:0]  ca [NCELL], cb [NCELL], cw [NCELL];
  logic         cop [NCELL];
  logic [31:0]  na [4], nb [4];
  int checks = 0, failures = 0;
  data_input dut (.cfg_i(cfg), .a_i(a), .b_i(b), .op_i(op), .cmp_a_i(cmp_a), .cmp_b_i(cmp_b),
    .am_a_i(am_a), .am_b_i(am_b), .am_sub_i(am_sub), .rnd_a_i(rnd_a), .rnd_b_i(rnd_b),
    .ca_o(ca), .cb_o(cb), .cop_o(cop), .cw_o(cw), .neg_a_o(na), .neg_b_o(nb));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s cfg=%s", what, cfg.name()); end
  endtask
  initial begin
    for (int n = 0; n < 200; n++) begin
      cfg = cfg_e'(n % 10);
      for (int i = 0; i < 8; i++) begin a[32*i +: 32] = $urandom; b[32*i +: 32] = $urandom; end
      {cmp_a, cmp_b, am_a, am_b, rnd_a, rnd_b} = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      op = $urandom; am_sub = $urandom;
      #1;
      for (int r = 0; r < NCELL; r++) begin
        case (cfg)
          CFG_MUL8:  chk(ca[r] == 16'(a[8*r +: 8]) && cb[r] == 16'(b[8*r +: 8]) && cop[r] == op &&
                         cw[r] == {b[128 + 8*r +: 8], a[128 + 8*r +: 8]}, "mul8");
          CFG_MUL16: chk(ca[r][7:0] == a[16*(r/4) + 8*(r%2) +: 8] && cb[r][7:0] == b[16*(r/4) + 8*((r/2)%2) +: 8] && !cop[r], "mul16");
          CFG_MUL32: chk(ca[r][7:0] == a[8*(r%4) +: 8] && cb[r][7:0] == b[8*(r/4) +: 8] && !cop[r], "mul32");
          CFG_MUL24: if (r < 9) chk(ca[r][7:0] == a[8*(r%3) +: 8] && cb[r][7:0] == b[8*(r/3) +: 8], "mul24");
          CFG_FPMUL: if (r >= 14) chk(ca[r] == rnd_a[16*(r-14) +: 16] && cb[r] == rnd_b[16*(r-14) +: 16] && !cop[r], "fpmul rnd");
          CFG_FPADD:
            if (r >= 10) chk({ca[r], cb[r], cop[r]} ==
              ((r < 12) ? {cmp_a[16*(r-10) +: 16], cmp_b[16*(r-10) +: 16], 1'b1} :
               (r < 14) ? {am_a[16*(r-12) +: 16], am_b[16*(r-12) +: 16], am_sub} :
                          {rnd_a[16*(r-14) +: 16], rnd_b[16*(r-14) +: 16], 1'b0}), "fpadd");
          default:   chk(ca[r] == a[16*r +: 16] && cb[r] == b[16*r +: 16] && cop[r] == op, "adder");
        endcase
      end
      if (cfg == CFG_MUL16)
        for (int g = 0; g < 4; g++)
          chk(na[g] == ((op && a[16*g+15]) ? 32'(b[16*g +: 16]) : 0) &&
              nb[g] == ((op && b[16*g+15]) ? 32'(a[16*g +: 16]) : 0), "neg16");
      if (cfg == CFG_MUL32)
        chk(na[0] == ((op && a[31]) ? b[31:0] : 0) && nb[0] == ((op && b[31]) ? a[31:0] : 0), "neg32");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
