// Testbench of ramm_cell (position 1): streams random operands through the
// 8-bit multiply-add (unsigned and signed, with the 16-bit addend), the
// 16-bit adder, the split 8-bit adder and the chained upper slice of a 32-bit
// adder, one per cycle, and checks value and latency (2, 1, 1 and 2 cycles).
module tb_ramm_cell;
  import rfpu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_e        cfg;
  logic [15:0] a, b, w, res;
  logic [7:0]  c;
  logic        op, cin, cout;
  cell_ctrl_t  ctrl;
  ramm_cell #(.IDX(1)) dut (.clk, .rst_n, .cfg_i(cfg), .a_i(a), .b_i(b), .op_i(op), .c_i(c),
    .w_i(w), .chain_cin_i(cin), .ctrl_o(ctrl), .res_o(res), .cout_o(cout));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int due; logic [16:0] v; bit chk_c; } exp_t;
  exp_t q[$];
  always @(negedge clk) begin
    if (q.size() > 0 && q[0].due == cyc) begin
      checks++;
      if (res !== q[0].v[15:0] || (q[0].chk_c && cout !== q[0].v[16])) begin
        failures++;
        if (failures < 6) $display("cfg=%s cyc=%0d got=%h exp=%h", cfg.name(), cyc, {cout, res}, q[0].v);
      end
      void'(q.pop_front());
    end
  end

  initial begin
    cfg = CFG_MUL8; a = 0; b = 0; w = 0; c = 0; op = 0; cin = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 5; ph++) begin
      cfg = (ph == 0) ? CFG_MUL8 : (ph == 1) ? CFG_ADD16 : (ph == 2) ? CFG_ADD8 : CFG_ADD32;
      cin = (ph == 4);
      for (int n = 0; n < 40; n++) begin
        exp_t e;
        int   pa, pb;
        @(negedge clk);
        #1;
        a = $urandom; b = $urandom; w = $urandom; op = $urandom;
        if (cfg == CFG_MUL8) begin
          a[15:8] = 0; b[15:8] = 0;
          pa = op ? int'($signed(a[7:0])) : int'(a[7:0]);
          pb = op ? int'($signed(b[7:0])) : int'(b[7:0]);
          e.v = {1'b0, 16'(pa * pb + int'(w))};
          e.due = cyc + 2;
        end else if (cfg == CFG_ADD8) begin
          e.v[15:8] = op ? a[15:8] - b[15:8] : a[15:8] + b[15:8];
          e.v[7:0]  = op ? a[7:0] - b[7:0] : a[7:0] + b[7:0];
          e.v[16]   = ({1'b0, a[15:8]} + {1'b0, op ? ~b[15:8] : b[15:8]} + 9'(op)) > 9'h0FF;
          e.due = cyc + 1;
        end else if (cfg == CFG_ADD16) begin
          e.v = 17'(a) + {1'b0, (op ? ~b : b)} + 17'(op);
          e.due = cyc + 1;
        end else begin
          e.v = 17'(a) + {1'b0, (op ? ~b : b)} + 17'(cin);
          e.due = cyc + 2;
        end
        e.chk_c = (cfg != CFG_MUL8);   // carry-out is not defined for a multiply
        q.push_back(e);
      end
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
