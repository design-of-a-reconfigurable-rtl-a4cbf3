// Testbench of ramm_network: with the cells' own decoders supplying the
// control, random cell outputs are applied in every configuration and the
// routed addends, chain carries and additive-module words are checked
// against the multiplier grid written out by hand.
module tb_ramm_network;
  import rfpu_pkg::*;
  cfg_e        cfg;
  cell_ctrl_t  ctrl [NCELL];
  logic [15:0] res [NCELL], macw [NCELL], w [NCELL];
  logic        cout [NCELL], cin [NCELL];
  logic [7:0]  c [NCELL];
  logic [31:0] as [4], ac [4];
  int checks = 0, failures = 0;
  for (genvar r = 0; r < NCELL; r++) begin : g
    fun_decoder #(.IDX(r)) u_dec (.cfg_i(cfg), .ctrl_o(ctrl[r]));
  end
  ramm_network dut (.cfg_i(cfg), .ctrl_i(ctrl), .res_i(res), .cout_i(cout), .mac_w_i(macw),
    .c_o(c), .w_o(w), .chain_cin_o(cin), .add_s_o(as), .add_c_o(ac));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what, int r);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s cfg=%s r=%0d", what, cfg.name(), r); end
  endtask
  function automatic logic [7:0] lo(int r); return res[r][7:0]; endfunction
  function automatic logic [7:0] hi(int r); return res[r][15:8]; endfunction
  initial begin
    for (int n = 0; n < 100; n++) begin
      cfg = cfg_e'(n % 10);
      for (int r = 0; r < NCELL; r++) begin res[r] = $urandom; macw[r] = $urandom; cout[r] = $urandom; end
      #1;
      for (int r = 1; r < NCELL; r++) chk(cin[r] == cout[r-1], "chain", r);
      case (cfg)
        CFG_MUL8: for (int r = 0; r < NCELL; r++) chk(c[r] == 0 && w[r] == macw[r], "mul8", r);
        CFG_MUL16: for (int g = 0; g < 4; g++) begin
          int b0;
          b0 = 4 * g;
          chk(c[b0+2] == lo(b0+1) && w[b0+2] == 16'(hi(b0)) && c[b0+3] == 0 && w[b0+3] == 16'(hi(b0+1)), "mul16 row1", g);
          chk(c[b0] == 0 && w[b0] == macw[b0], "mul16 row0", g);
          chk(as[g] == 32'(lo(b0+3)) && ac[g] == {16'h0, hi(b0+3), hi(b0+2)}, "mul16 add", g);
        end
        CFG_MUL32: begin
          chk(c[5] == lo(2) && w[5] == 16'(hi(1)), "mul32 (1,1)", 5);
          chk(c[15] == 0 && w[15] == 16'(hi(11)), "mul32 (3,3)", 15);
          chk(c[12] == lo(9) && w[12] == 16'(hi(8)), "mul32 (0,3)", 12);
          chk(as[0] == {8'h0, lo(15), lo(14), lo(13)} && ac[0] == {hi(15), hi(14), hi(13), hi(12)}, "mul32 add", 0);
        end
        CFG_MUL24, CFG_FPMUL: begin
          chk(c[4] == lo(2) && w[4] == 16'(hi(1)), "mul24 (1,1)", 4);
          chk(c[8] == 0 && w[8] == 16'(hi(5)), "mul24 (2,2)", 8);
          chk(as[0] == {16'h0, lo(8), lo(7)} && ac[0] == {8'h0, hi(8), hi(7), hi(6)}, "mul24 add", 0);
        end
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
