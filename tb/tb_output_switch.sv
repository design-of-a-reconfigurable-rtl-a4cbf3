// Testbench of output_switch: with the cells' decoders supplying the
// control, a fresh random result is put on every cell each cycle; the
// assembled output must combine the parts of one operation, each taken from
// the cycle in which its cell produced it (chained adders, 8/16/32-bit
// multiplies) and the FP adder pairs.
module tb_output_switch;
  import rfpu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_e         cfg;
  cell_ctrl_t   ctrl [NCELL];
  logic [15:0]  res [NCELL], alo [4];
  logic         cout [NCELL];
  logic [31:0]  ares [4];
  logic [255:0] o;
  logic [32:0]  cmp, am, rnd;
  for (genvar r = 0; r < NCELL; r++) begin : g
    fun_decoder #(.IDX(r)) u_dec (.cfg_i(cfg), .ctrl_o(ctrl[r]));
  end
  output_switch dut (.clk, .rst_n, .cfg_i(cfg), .ctrl_i(ctrl), .res_i(res), .cout_i(cout),
    .add_lo_i(alo), .add_res_i(ares), .o_o(o), .cmp_o(cmp), .am_o(am), .rnd_o(rnd));
  int checks = 0, failures = 0, cyc = 0;
  logic [15:0] hist [int][NCELL];   // cell results by cycle
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s cfg=%s cyc=%0d", what, cfg.name(), cyc); end
  endtask
  function automatic logic [15:0] h(int t, int r); return hist[t][r]; endfunction
  initial begin
    cfg = CFG_ADD8;
    for (int r = 0; r < NCELL; r++) begin res[r] = 0; cout[r] = 0; end
    for (int g = 0; g < 4; g++) begin alo[g] = 0; ares[g] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 10; c++) begin
      cfg = cfg_e'(c);
      for (int n = 0; n < 20; n++) begin
        @(posedge clk);
        #1;
        cyc++;
        for (int r = 0; r < NCELL; r++) begin res[r] = $urandom; cout[r] = $urandom; hist[cyc][r] = res[r]; end
        for (int g = 0; g < 4; g++) begin alo[g] = $urandom; ares[g] = $urandom; end
        #1;
        if (n < 10) continue;
        case (cfg)
          CFG_ADD8, CFG_ADD16, CFG_MUL8: for (int r = 0; r < NCELL; r++) chk(o[16*r +: 16] == res[r], "direct");
          CFG_ADD32: for (int p = 0; p < 8; p++) chk(o[32*p +: 32] == {res[2*p+1], h(cyc-1, 2*p)}, "add32");
          CFG_ADD64: for (int p = 0; p < 4; p++)
            chk(o[64*p +: 64] == {res[4*p+3], h(cyc-1, 4*p+2), h(cyc-2, 4*p+1), h(cyc-3, 4*p)}, "add64");
          CFG_MUL16: for (int g = 0; g < 4; g++)
            chk(o[32*g +: 32] == {alo[g], h(cyc-1, 4*g+2)[7:0], h(cyc-3, 4*g)[7:0]}, "mul16");
          CFG_MUL24, CFG_FPMUL:
            chk(o[47:0] == {ares[0][23:0], h(cyc-2, 6)[7:0], h(cyc-4, 3)[7:0], h(cyc-6, 0)[7:0]}, "mul24");
          CFG_MUL32:
            chk(o[63:0] == {ares[0], h(cyc-2, 12)[7:0], h(cyc-4, 8)[7:0], h(cyc-6, 4)[7:0], h(cyc-8, 0)[7:0]}, "mul32");
          default:
            chk(cmp == {cout[11], res[11], h(cyc-1, 10)} && am == {cout[13], res[13], h(cyc-1, 12)} &&
                rnd == {cout[15], res[15], h(cyc-1, 14)}, "fp pairs");
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
