// Self-checking testbench of the rAMM array: streams random operations, one
// per cycle, through every integer configuration (add and sub, unsigned and
// signed) and through the three FP-side adders, and checks every result
// bit-exactly and in exactly the published number of cycles.
module tb_ramm_array;
  import rfpu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_e         cfg;
  logic [255:0] a, b, o;
  logic         op;
  logic [31:0]  cmp_a, cmp_b, am_a, am_b, rnd_a, rnd_b;
  logic         am_sub;
  logic [32:0]  cmp_o, am_o, rnd_o;

  ramm_array dut (.clk, .rst_n, .cfg_i(cfg), .a_i(a), .b_i(b), .op_i(op),
    .cmp_a_i(cmp_a), .cmp_b_i(cmp_b), .am_a_i(am_a), .am_b_i(am_b), .am_sub_i(am_sub),
    .rnd_a_i(rnd_a), .rnd_b_i(rnd_b), .o_o(o), .cmp_o, .am_o, .rnd_o);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int           due;
    logic [255:0] o;
    logic [32:0]  cmp, am, rnd;
    logic         fp;
  } exp_t;
  exp_t q[$];

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [255:0] ref_int(cfg_e c, logic [255:0] x, logic [255:0] y, logic s);
    logic [255:0] r = '0;
    case (c)
      CFG_ADD8:  for (int i = 0; i < 32; i++) r[8*i +: 8]   = s ? x[8*i +: 8] - y[8*i +: 8] : x[8*i +: 8] + y[8*i +: 8];
      CFG_ADD16: for (int i = 0; i < 16; i++) r[16*i +: 16] = s ? x[16*i +: 16] - y[16*i +: 16] : x[16*i +: 16] + y[16*i +: 16];
      CFG_ADD32: for (int i = 0; i < 8; i++)  r[32*i +: 32] = s ? x[32*i +: 32] - y[32*i +: 32] : x[32*i +: 32] + y[32*i +: 32];
      CFG_ADD64: for (int i = 0; i < 4; i++)  r[64*i +: 64] = s ? x[64*i +: 64] - y[64*i +: 64] : x[64*i +: 64] + y[64*i +: 64];
      CFG_MUL8: for (int i = 0; i < 16; i++) begin
        longint pa, pb;
        pa = s ? longint'($signed(x[8*i +: 8])) : longint'(x[8*i +: 8]);
        pb = s ? longint'($signed(y[8*i +: 8])) : longint'(y[8*i +: 8]);
        r[16*i +: 16] = 16'(pa * pb + longint'({y[128+8*i +: 8], x[128+8*i +: 8]}));
      end
      CFG_MUL16: for (int i = 0; i < 4; i++) begin
        longint pa, pb;
        pa = s ? longint'($signed(x[16*i +: 16])) : longint'(x[16*i +: 16]);
        pb = s ? longint'($signed(y[16*i +: 16])) : longint'(y[16*i +: 16]);
        r[32*i +: 32] = 32'(pa * pb);
      end
      CFG_MUL24: begin
        longint pa, pb;
        pa = s ? longint'($signed(x[23:0])) : longint'(x[23:0]);
        pb = s ? longint'($signed(y[23:0])) : longint'(y[23:0]);
        r[47:0] = 48'(pa * pb);
      end
      CFG_MUL32: begin
        longint pa, pb;
        pa = s ? longint'($signed(x[31:0])) : longint'(x[31:0]);
        pb = s ? longint'($signed(y[31:0])) : longint'(y[31:0]);
        r[63:0] = 64'(pa * pb);
      end
      default: ;
    endcase
    return r;
  endfunction

  // checker, at the falling edge
  always @(negedge clk) begin
    while (q.size() > 0 && q[0].due == cyc) begin
      checks++;
      if (q[0].fp ? {cmp_o, am_o, rnd_o} !== {q[0].cmp, q[0].am, q[0].rnd} : o !== q[0].o) begin
        failures++;
        if (failures < 10) $display("MISMATCH cfg=%s cyc=%0d got=%h exp=%h", cfg.name(), cyc, o, q[0].o);
      end
      void'(q.pop_front());
    end
    if (q.size() > 0 && q[0].due < cyc) begin
      failures++;
      void'(q.pop_front());
    end
  end

  initial begin
    cfg = CFG_ADD8; a = '0; b = '0; op = 0;
    {cmp_a, cmp_b, am_a, am_b, rnd_a, rnd_b, am_sub} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c <= 8; c++) begin
      for (int s = 0; s < 2; s++) begin
        cfg = cfg_e'(c);
        for (int n = 0; n < 24; n++) begin
          exp_t e;
          @(negedge clk);
          a = rnd256(); b = rnd256(); op = s[0];
          if (n % 5 == 0) begin a[255:224] = '1; b[63:0] = '1; end  // extremes
          cmp_a = $urandom; cmp_b = $urandom; am_a = $urandom; am_b = $urandom;
          rnd_a = $urandom; rnd_b = $urandom; am_sub = $urandom;
          e.due = cyc + ((cfg == CFG_FPADD) ? 2 : int'(cfg_latency(cfg)));
          e.fp  = (cfg == CFG_FPADD);
          e.o   = ref_int(cfg, a, b, op);
          e.cmp = {1'b0, cmp_a} + {1'b0, ~cmp_b} + 33'd1;
          e.am  = am_sub ? {1'b0, am_a} + {1'b0, ~am_b} + 33'd1 : {1'b0, am_a} + {1'b0, am_b};
          e.rnd = {1'b0, rnd_a} + {1'b0, rnd_b};
          q.push_back(e);
        end
        // drain before the configuration changes
        repeat (cfg_latency(cfg) + 2) @(negedge clk);
        if (c == 8) break;
      end
    end
    repeat (4) @(negedge clk);
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
