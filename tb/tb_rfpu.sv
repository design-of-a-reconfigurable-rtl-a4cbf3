// End-to-end testbench of the reconfigurable FPU at its full size.
//
// Streams operations of every kind through the top level: all eight integer
// array configurations (add and subtract, unsigned and signed multiply, 8-bit
// MAC), FP add and subtract mixed back to back, and FP multiply, with random
// operands plus operands chosen to reach cancellation, rounding carry-out,
// overflow, underflow, infinities, NaNs, zeros and denormals. Configuration
// changes are offered without waiting, so the issue logic must stall.
// Every result is compared with an independent reference (integer results
// from plain SystemVerilog arithmetic, FP results from double-precision
// arithmetic rounded to single precision to nearest-even), and must appear
// exactly the documented number of cycles after it was taken.
// Mechanism counters: each configuration, stalls, effective subtraction,
// operand swap, exact cancellation, rounding carry-out, overflow, underflow
// and special-value results must each be seen at least once.
module tb_rfpu;
  import rfpu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid, in_ready, out_valid;
  logic [5:0]   inst;
  logic [255:0] a, b, o;

  rfpu dut (.clk, .rst_n, .in_valid, .in_ready, .inst, .a, .b, .out_valid, .o);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ references
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
      default: begin
        longint pa, pb;
        pa = s ? longint'($signed(x[31:0])) : longint'(x[31:0]);
        pb = s ? longint'($signed(y[31:0])) : longint'(y[31:0]);
        r[63:0] = 64'(pa * pb);
      end
    endcase
    return r;
  endfunction

  // single -> double bit pattern, denormals read as zero
  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00)      d = {f[31], 63'h0};
    else if (f[30:23] == 8'hFF) d = {f[31], 11'h7FF, f[22:0], 29'h0};
    else                        d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'h0};
    return $bitstoreal(d);
  endfunction

  // double -> single, round to nearest even, results below the normal
  // range flushed to a signed zero, NaN as the default quiet NaN
  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [52:0] m53;
    logic [24:0] m25;
    int          e;
    logic        inc;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'h0};
    if (d[62:52] == 11'h000) return {d[63], 31'h0};
    e   = int'(d[62:52]) - 1023 + 127;
    m53 = {1'b1, d[51:0]};
    inc = m53[28] && ((|m53[27:0]) || m53[29]);
    m25 = {1'b0, m53[52:29]} + 25'(inc);
    if (m25[24]) begin
      m25 = m25 >> 1;
      e++;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'h0};
    if (e <= 0)   return {d[63], 31'h0};
    return {d[63], 8'(e), m25[22:0]};
  endfunction

  function automatic logic [31:0] rand_fp(int kind);
    logic [31:0] f;
    f = $urandom;
    case (kind)
      0: f[30:23] = 8'(100 + $urandom_range(0, 54));        // ordinary
      1: f[30:23] = 8'(240 + $urandom_range(0, 14));        // near overflow
      2: f[30:23] = 8'(1 + $urandom_range(0, 14));          // near underflow
      3: f = {f[31], 8'h00, f[22:0]};                       // denormal / zero
      4: f = {f[31], 8'hFF, 23'h0};                         // infinity
      5: f = {f[31], 8'hFF, f[22:0] | 23'h1};               // NaN
      default: f[30:23] = 8'(120 + $urandom_range(0, 14));
    endcase
    return f;
  endfunction

  // ------------------------------------------------------------ scoreboard
  typedef struct {
    int           due;
    logic [255:0] o;
    cfg_e         cfg;
  } exp_t;
  exp_t q[$];
  int cfg_seen [10];
  int stalls = 0;

  always @(negedge clk) begin
    if (!rst_n) begin
      // nothing
    end else if (q.size() > 0 && q[0].due == cyc) begin
      checks++;
      if (!out_valid || o !== q[0].o) begin
        failures++;
        if (failures < 12)
          $display("MISMATCH %s cyc=%0d valid=%0b got=%h exp=%h", q[0].cfg.name(), cyc, out_valid,
                   o[63:0], q[0].o[63:0]);
      end
      cfg_seen[int'(q[0].cfg)]++;
      void'(q.pop_front());
    end else if (out_valid) begin
      failures++;
      $display("unexpected out_valid at cyc=%0d", cyc);
    end
  end

  // mechanism counters, sampled on results as they leave
  int n_effsub = 0, n_swap = 0, n_cancel = 0, n_rndovf = 0, n_of = 0, n_uf = 0, n_special = 0;
  always @(posedge clk) begin
    if (rst_n && dut.u_pre.eff_sub_o && dut.s4.ua.m != 0 && dut.s4.ub.m != 0 && dut.cfg_cur == CFG_FPADD) n_effsub++;
    if (rst_n && dut.u_pre.swap_o && dut.cfg_cur == CFG_FPADD && dut.s4.ub.m != 0) n_swap++;
    if (out_valid && dut.is_fp_cur) begin
      if (dut.r2.sp.hit) n_special++;
      else if (dut.r2.zero) n_cancel++;
      else begin
        if (dut.rnd_ovf) n_rndovf++;
        if (dut.of) n_of++;
        if (dut.uf) n_uf++;
      end
    end
  end

  // ------------------------------------------------------------ driver
  task automatic send(logic [5:0] i, logic [255:0] x, logic [255:0] y);
    exp_t  e;
    inst_t it;
    cfg_e  c;
    @(negedge clk);
    #1;
    inst = i; a = x; b = y; in_valid = 1'b1;
    it = inst_t'(i);
    c  = inst2cfg(it);
    #1;
    while (!in_ready) begin
      stalls++;
      @(negedge clk);
      #2;
    end
    e.cfg = c;
    e.due = cyc + int'(cfg_latency(c));
    if (c == CFG_FPADD)
      e.o = {224'h0, r2f(f2r(x[31:0]) + (it.mode == 2'b10 ? -f2r(y[31:0]) : f2r(y[31:0])))};
    else if (c == CFG_FPMUL)
      e.o = {224'h0, r2f(f2r(x[31:0]) * f2r(y[31:0]))};
    else
      e.o = ref_int(c, x, y, it.op);
    q.push_back(e);
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  task automatic fp_pair(output logic [31:0] x, output logic [31:0] y);
    int k = $urandom_range(0, 19);
    x = rand_fp(k < 12 ? 0 : (k < 14 ? 1 : (k < 16 ? 2 : (k == 16 ? 3 : (k == 17 ? 4 : (k == 18 ? 5 : 6))))));
    y = rand_fp($urandom_range(0, 3) == 0 ? 6 : 0);
    case ($urandom_range(0, 7))
      0: y = {~x[31], x[30:0]};                               // exact cancellation
      1: y = {~x[31], x[30:5], 5'($urandom)};                 // near cancellation
      2: y = {x[31:23], 23'h7FFFFF};                          // rounding carry
      3: begin x[22:0] = 23'h7FFFFF; y = 32'h3F80_0000; end   // x*1 / x+1
      4: y = {$urandom_range(0, 1) ? 1'b1 : 1'b0, x[30:23] + 8'd1, 23'($urandom)};
      default: ;
    endcase
  endtask

  localparam logic [5:0] I_FADD = 6'b01_0000, I_FSUB = 6'b10_0000, I_FMUL = 6'b11_0000;

  initial begin
    logic [31:0] x, y;
    in_valid = 0; inst = '0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // integer configurations, back to back, changes offered without waiting
    for (int rep = 0; rep < 2; rep++)
      for (int c = 0; c < 8; c++)
        for (int s = 0; s < 2; s++)
          for (int n = 0; n < 12; n++) begin
            logic [255:0] x256, y256;
            x256 = rnd256(); y256 = rnd256();
            if (n == 0) begin x256[255:192] = '1; y256[63:0] = '1; end
            send({2'b00, c[2], s[0], c[1:0]}, x256, y256);
          end
    // FP add/sub mixed
    for (int n = 0; n < 600; n++) begin
      fp_pair(x, y);
      send(($urandom_range(0, 1) != 0) ? I_FADD : I_FSUB, {rnd256() >> 32, x}, {rnd256() >> 32, y});
    end
    // FP mul
    for (int n = 0; n < 600; n++) begin
      fp_pair(x, y);
      if (n % 7 == 0) begin x = rand_fp(1); y = rand_fp(1); end   // overflow
      if (n % 7 == 1) begin x = rand_fp(2); y = rand_fp(2); end   // underflow
      send(I_FMUL, {rnd256() >> 32, x}, {rnd256() >> 32, y});
    end
    // alternate FP and integer work so every switch stalls
    for (int n = 0; n < 20; n++) begin
      fp_pair(x, y);
      send(n % 2 ? I_FMUL : I_FADD, {224'h0, x}, {224'h0, y});
      send(6'b00_1111, rnd256(), rnd256());
    end
    repeat (20) @(negedge clk);
    if (q.size() != 0) begin failures++; $display("%0d results never came", q.size()); end
    for (int c = 0; c < 10; c++)
      if (cfg_seen[c] == 0) begin failures++; $display("configuration %0d never ran", c); end
    $display("mechanisms: stalls=%0d effsub=%0d swap=%0d cancel=%0d rndovf=%0d overflow=%0d underflow=%0d special=%0d",
             stalls, n_effsub, n_swap, n_cancel, n_rndovf, n_of, n_uf, n_special);
    if (stalls == 0)    failures++;
    if (n_effsub == 0)  failures++;
    if (n_swap == 0)    failures++;
    if (n_cancel == 0)  failures++;
    if (n_rndovf == 0)  failures++;
    if (n_of == 0)      failures++;
    if (n_uf == 0)      failures++;
    if (n_special == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
