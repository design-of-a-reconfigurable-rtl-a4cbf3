// Testbench of fun_decoder: one decoder per cell position, every
// configuration; checks the group membership, grid position, operand and
// result delays and carry chaining against the rules of the array.
module tb_fun_decoder;
  import rfpu_pkg::*;
  cfg_e       cfg;
  cell_ctrl_t ctrl [NCELL];
  int checks = 0, failures = 0;
  for (genvar r = 0; r < NCELL; r++) begin : g
    fun_decoder #(.IDX(r)) dut (.cfg_i(cfg), .ctrl_o(ctrl[r]));
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what, int r);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s cfg=%s cell=%0d", what, cfg.name(), r);
    end
  endtask
  initial begin
    for (int c = 0; c < 10; c++) begin
      cfg = cfg_e'(c);
      #1;
      for (int r = 0; r < NCELL; r++) begin
        cell_ctrl_t t;
        t = ctrl[r];
        case (cfg)
          CFG_ADD8, CFG_ADD16:
            chk(t.active && !t.mul && !t.chain && t.in_dly == 0 && t.out_dly == 0 &&
                t.split8 == (cfg == CFG_ADD8), "adder", r);
          CFG_ADD32:
            chk(t.active && !t.mul && t.chain == (r % 2 == 1) && t.in_dly == r % 2 && t.out_dly == 1 - r % 2, "add32", r);
          CFG_ADD64:
            chk(t.active && !t.mul && t.chain == (r % 4 != 0) && t.in_dly == r % 4 && t.out_dly == 3 - r % 4, "add64", r);
          CFG_MUL8:
            chk(t.active && t.mul && t.k == 1 && t.row == 0 && t.col == 0 && t.in_dly == 0 && t.out_dly == 0, "mul8", r);
          CFG_MUL16:
            chk(t.mul && t.k == 2 && t.base == 4 * (r / 4) && t.col == r % 2 && t.row == (r % 4) / 2 &&
                t.in_dly == 2 * ((r % 4) / 2) && (r % 2 == 1 || t.out_dly == 3 - 2 * ((r % 4) / 2)), "mul16", r);
          CFG_MUL24, CFG_FPMUL:
            if (r < 9) chk(t.mul && t.k == 3 && t.base == 0 && t.col == r % 3 && t.row == r / 3 &&
                           t.in_dly == 2 * (r / 3) && (r % 3 != 0 || t.out_dly == 6 - 2 * (r / 3)), "mul24", r);
            else if (cfg == CFG_FPMUL && r >= 14) chk(t.active && !t.mul && t.chain == (r == 15), "fpmul rnd", r);
            else chk(!t.active, "idle", r);
          CFG_MUL32:
            chk(t.mul && t.k == 4 && t.col == r % 4 && t.row == r / 4 && t.in_dly == 2 * (r / 4) &&
                (r % 4 != 0 || t.out_dly == 8 - 2 * (r / 4)), "mul32", r);
          default:
            if (r >= 10) chk(t.active && !t.mul && t.chain == (r % 2 == 1) && t.in_dly == r % 2, "fpadd", r);
            else chk(!t.active, "idle", r);
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
