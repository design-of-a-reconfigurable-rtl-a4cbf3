// Testbench of additive_module: streams random sum/carry words and
// correction terms (the corrections issued dly cycles ahead, as the array
// does) and checks the low half after one cycle and the full word after two.
module tb_additive_module;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0]  dly;
  logic [31:0] s, c, na, nb, res;
  logic [15:0] res_lo;
  additive_module dut (.clk, .rst_n, .dly_i(dly), .s_i(s), .c_i(c), .neg_a_i(na), .neg_b_i(nb),
                       .res_lo_o(res_lo), .res_o(res));
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [31:0] nav [int], nbv [int], expv [int];
  always @(negedge clk) begin
    if (expv.exists(cyc - 1)) begin
      checks++;
      if (res_lo !== expv[cyc - 1][15:0]) failures++;
    end
    if (expv.exists(cyc - 2)) begin
      checks++;
      if (res !== expv[cyc - 2]) begin
        failures++;
        if (failures < 5) $display("cyc=%0d got=%h exp=%h", cyc, res, expv[cyc - 2]);
      end
    end
  end
  initial begin
    dly = 4; s = 0; c = 0; na = 0; nb = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 3; ph++) begin
      dly = 4'(4 + 2 * ph);
      for (int n = 0; n < 60; n++) begin
        @(negedge clk);
        #1;
        na = ($urandom_range(0, 2) == 0) ? 0 : $urandom;
        nb = ($urandom_range(0, 2) == 0) ? 0 : $urandom;
        nav[cyc] = na; nbv[cyc] = nb;
        s = $urandom; c = $urandom;
        if (n >= 10 && nav.exists(cyc - int'(dly)))
          expv[cyc] = s + c - nav[cyc - int'(dly)] - nbv[cyc - int'(dly)];
      end
      repeat (3) @(negedge clk);
      expv.delete(); nav.delete(); nbv.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
