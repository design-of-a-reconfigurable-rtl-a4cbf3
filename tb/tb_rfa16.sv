// Testbench of rfa16: one 16-bit adder and two independent 8-bit adders,
// with carries in and out, against plain integer sums.
module tb_rfa16;
  logic [15:0] a, b, s;
  logic        cl, ch, split, col, co;
  int checks = 0, failures = 0;
  rfa16 dut (.a_i(a), .b_i(b), .cin_lo_i(cl), .cin_hi_i(ch), .split_i(split), .sum_o(s),
             .cout_lo_o(col), .cout_o(co));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [16:0] full;
      logic [8:0]  lo, hi;
      a = $urandom; b = $urandom; {cl, ch, split} = 3'($urandom);
      if (n < 4) begin a = 16'hFFFF; b = 16'h0000; cl = 1; end
      #1;
      checks++;
      lo = 9'(a[7:0]) + 9'(b[7:0]) + 9'(cl);
      if (split) begin
        hi = 9'(a[15:8]) + 9'(b[15:8]) + 9'(ch);
        if ({co, s} !== {hi[8], hi[7:0], lo[7:0]} || col !== lo[8]) failures++;
      end else begin
        full = 17'(a) + 17'(b) + 17'(cl);
        if ({co, s} !== full || col !== lo[8]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
