// Multiply-accumulate workload on the full-size unit: sixteen 8-bit lanes
// each accumulate a 24-term dot product, unsigned and then signed. Every
// step issues one 8-bit MAC whose 16-bit addend is the unit's own previous
// result for that lane, taken from o and fed back through the upper halves
// of a and b. The final accumulators are compared with dot products worked
// out in the testbench (modulo 2^16), and every step must take exactly the
// 2-cycle MAC latency.
module tb_rfpu_mac;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic         in_valid, in_ready, out_valid;
  logic [5:0]   inst;
  logic [255:0] a, b, o;
  rfpu dut (.clk, .rst_n, .in_valid, .in_ready, .inst, .a, .b, .out_valid, .o);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int TERMS = 24;
  initial begin
    in_valid = 0; inst = 0; a = 0; b = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int sgn = 0; sgn < 2; sgn++) begin
      logic [15:0] acc [16];
      int          ref_sum [16];
      for (int l = 0; l < 16; l++) begin acc[l] = 0; ref_sum[l] = 0; end
      for (int t = 0; t < TERMS; t++) begin
        int t0;
        @(negedge clk);
        inst = {2'b00, 1'b1, sgn[0], 2'b00};
        for (int l = 0; l < 16; l++) begin
          logic [7:0] x, y;
          x = $urandom; y = $urandom;
          a[8*l +: 8] = x; b[8*l +: 8] = y;
          {b[128 + 8*l +: 8], a[128 + 8*l +: 8]} = acc[l];
          ref_sum[l] += sgn ? int'($signed(x)) * int'($signed(y)) : int'(x) * int'(y);
        end
        in_valid = 1;
        #1;
        if (!in_ready) failures++;
        t0 = cyc;
        @(posedge clk);
        #1;
        in_valid = 0;
        while (!out_valid) @(negedge clk);
        checks++;
        if (cyc - t0 != 2) begin failures++; $display("MAC latency %0d", cyc - t0); end
        for (int l = 0; l < 16; l++) acc[l] = o[16*l +: 16];
      end
      for (int l = 0; l < 16; l++) begin
        checks++;
        if (acc[l] !== 16'(ref_sum[l])) begin
          failures++;
          $display("lane %0d sgn=%0d got=%h exp=%h", l, sgn, acc[l], 16'(ref_sum[l]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
