// rfpu: reconfigurable floating-point unit (top level).
//
// One datapath serves IEEE 754 single-precision add, subtract and multiply
// and a family of SIMD integer operations on 256-bit operands. All the
// adders and multipliers the FP operations need are borrowed from the array
// of sixteen reconfigurable additive multiply modules (ramm_array), which in
// integer mode does the SIMD work itself.
//
// Interface: an operation is offered with in_valid, the 6-bit instruction
// word inst and the operands a and b, and is taken on a rising clock edge
// where in_valid and in_ready are both high. Its result appears on o with
// out_valid a fixed number of cycles later (counting the taking edge as the
// first): 1 for 8/16-bit add, 2 for 32-bit add and 8-bit mul/MAC, 4 for
// 64-bit add, 5/8/10 for 16/24/32-bit mul, 10 for FP add/sub, 12 for FP mul.
// A new operation may be taken every cycle as long as it uses the same array
// configuration as the ones in flight; in_ready drops (a stall) when the
// configuration changes until the previous results have all left, because
// the cells are wired differently per configuration. FP add and FP sub share
// one configuration. FP operands and results use o/a/b bits [31:0].
//
// FP add/sub pipeline (edge numbers after the taking edge = 1):
//   1 unpack | 2 exponent subtract | 3-4 significand compare on cells 10/11 |
//   5 order and align | 6-7 27-bit add/sub on cells 12/13 | 8 normalize |
//   9-10 rounding increment on cells 14/15, then exponent adjust and pack.
// FP mul pipeline:
//   1 unpack | 2-9 24-bit multiply on cells 0..8 (exponent add and sign in
//   parallel) | 10 normalize | 11-12 rounding increment on cells 14/15, then
//   exponent adjust and pack.
//
// The block list, the 6-bit instruction word, the 256-bit ports, the
// 10/12-cycle FP latencies, round-to-nearest-even and the use of array
// adders for comparison, significand add and rounding follow the published
// design. The valid/ready handshake, the drain-before-reconfigure rule, the
// exact split of the FP pipelines into stages, flush-to-zero for denormals
// and the default NaN are this design's choices. Registers reset to zero.
module rfpu
  import rfpu_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [5:0]   inst,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic         out_valid,
  output logic [DW-1:0] o
);
  // ---------------------------------------------------------------- control
  inst_t       ins;
  cfg_e        cfg_in, cfg_cur, cfg_now;
  logic        issue, drained;
  logic [3:0]  since;
  logic [11:0] vsr;

  assign ins      = inst_t'(inst);
  assign drained  = (32'(since) > cfg_latency(cfg_cur));
  assign in_ready = (cfg_in == cfg_cur) || drained;
  assign issue    = in_valid && in_ready;
  assign cfg_now  = issue ? cfg_in : cfg_cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_cur <= CFG_ADD8;
      since   <= 4'hF;
      vsr     <= '0;
    end else begin
      // a configuration change happens only when nothing is in flight, so
      // the history of the old configuration is dropped
      vsr <= (issue && cfg_in != cfg_cur) ? 12'd1 : {vsr[10:0], issue};
      if (issue) begin
        cfg_cur <= cfg_in;
        since   <= 4'd1;
      end else if (since != 4'hF) begin
        since <= since + 4'd1;
      end
    end
  end
  assign out_valid = vsr[cfg_latency(cfg_cur) - 1];

  // the same configuration stays in place while results are outstanding
  a_cfg_stable: assert property (@(posedge clk) disable iff (!rst_n)
    issue && (cfg_in != cfg_cur) |-> drained);

  // ---------------------------------------------------------------- unpack
  typedef struct packed {
    fp_opnd_t          ua;
    fp_opnd_t          ub;
    fp_special_t       sp;
    logic signed [9:0] diff;
    logic [7:0]        ebig;
    logic signed [9:0] emul;
    logic [26:0]       x;
    logic [26:0]       y;
    logic              eff_sub;
    logic              sign;
    logic              zsign;
  } pl_t;

  typedef struct packed {
    fp_special_t       sp;
    logic [23:0]       m;
    logic              g;
    logic              st;
    logic signed [9:0] e;
    logic              zero;
    logic              sign;
    logic              zsign;
  } ps_t;

  fp_opnd_t    ua, ub;
  fp_special_t sp;
  logic        is_fp_in, fmul_in;
  pl_t         s1, s2, s3, s4, s5, s6, s7;
  pl_t         m_d [2:9];
  ps_t         ps, r1, r2;

  fp_unpack u_unpack (
    .inst_i(ins), .a_i(a[31:0]), .b_i(b[31:0]), .cfg_o(cfg_in), .is_fp_o(is_fp_in),
    .fmul_o(fmul_in), .ua_o(ua), .ub_o(ub), .special_o(sp)
  );

  // ---------------------------------------------------------------- exponent
  logic signed [9:0] e_diff, e_mul;
  logic [7:0]        e_big;
  fp_exponent u_exp (.ea_i(s1.ua.e), .eb_i(s1.ub.e), .diff_o(e_diff), .ebig_o(e_big), .emul_o(e_mul));

  // ---------------------------------------------------------------- sign
  logic add_sign, add_zsign, mul_sign, mul_zsign, swap, eff_sub;
  logic [26:0] x27, y27;
  fp_sign u_sign_mul (.fmul_i(1'b1), .sa_i(s1.ua.s), .sb_i(s1.ub.s), .swap_i(1'b0),
                      .sign_o(mul_sign), .zero_sign_o(mul_zsign));
  fp_sign u_sign_add (.fmul_i(1'b0), .sa_i(s4.ua.s), .sb_i(s4.ub.s), .swap_i(swap),
                      .sign_o(add_sign), .zero_sign_o(add_zsign));

  // ---------------------------------------------------------------- array
  logic [DW-1:0]  arr_a, arr_b, arr_o;
  logic [32:0]   cmp_res, am_res, rnd_res;
  logic [31:0]   am_a, am_b, rnd_a, rnd_b;
  logic          am_sub, arr_op;

  always_comb begin
    arr_a  = a;
    arr_b  = b;
    arr_op = ins.op;
    if (cfg_now == CFG_FPMUL) begin
      arr_a  = DW'(s1.ua.m);
      arr_b  = DW'(s1.ub.m);
      arr_op = 1'b0;
    end else if (cfg_now == CFG_FPADD) begin
      arr_op = 1'b0;
    end
  end

  ramm_array u_array (
    .clk, .rst_n, .cfg_i(cfg_now), .a_i(arr_a), .b_i(arr_b), .op_i(arr_op),
    .cmp_a_i({8'h00, s2.ua.m}), .cmp_b_i({8'h00, s2.ub.m}),
    .am_a_i(am_a), .am_b_i(am_b), .am_sub_i(am_sub),
    .rnd_a_i(rnd_a), .rnd_b_i(rnd_b),
    .o_o(arr_o), .cmp_o(cmp_res), .am_o(am_res), .rnd_o(rnd_res)
  );

  // ---------------------------------------------------------------- pre_module
  fp_pre_module u_pre (
    .ma_i(s4.ua.m), .mb_i(s4.ub.m), .sa_i(s4.ua.s), .sb_i(s4.ub.s), .diff_i(s4.diff),
    .cmp_ge_i(cmp_res[32]), .x_o(x27), .y_o(y27), .swap_o(swap), .eff_sub_o(eff_sub)
  );

  // ---------------------------------------------------------------- addMul
  logic              fmul_cur;
  logic [47:0]       sig;
  logic signed [9:0] sig_e;
  pl_t               pl_ps;
  assign fmul_cur = (cfg_cur == CFG_FPMUL);
  assign pl_ps    = fmul_cur ? m_d[9] : s7;

  fp_addmul u_addmul (
    .fmul_i(fmul_cur), .x_i(s5.x), .y_i(s5.y), .eff_sub_i(s5.eff_sub),
    .am_a_o(am_a), .am_b_o(am_b), .am_sub_o(am_sub),
    .am_res_i(am_res), .prod_i(arr_o[47:0]), .ebig_i(pl_ps.ebig), .emul_i(pl_ps.emul),
    .sig_o(sig), .e_o(sig_e)
  );

  // ---------------------------------------------------------------- post_shift
  logic [23:0]       n_m;
  logic              n_g, n_st, n_zero;
  logic signed [9:0] n_e;
  fp_post_shift u_post (.sig_i(sig), .e_i(sig_e), .m_o(n_m), .g_o(n_g), .st_o(n_st),
                        .e_o(n_e), .zero_o(n_zero));

  // ---------------------------------------------------------------- round_shift
  logic [22:0] frac;
  logic        rnd_ovf;
  fp_round_shift u_round (.m_i(ps.m), .g_i(ps.g), .st_i(ps.st), .rnd_a_o(rnd_a), .rnd_b_o(rnd_b),
                          .rnd_res_i(rnd_res), .frac_o(frac), .ovf_o(rnd_ovf));

  // ---------------------------------------------------------------- exp_adj, pack
  logic [7:0] e_fin;
  logic       of, uf, is_fp_cur;
  fp_exp_adj u_eadj (.e_i(r2.e), .ovf_i(rnd_ovf), .e_o(e_fin), .of_o(of), .uf_o(uf));

  assign is_fp_cur = (cfg_cur == CFG_FPADD) || (cfg_cur == CFG_FPMUL);
  fp_pack u_pack (
    .is_fp_i(is_fp_cur), .int_i(arr_o), .special_i(r2.sp), .zero_i(r2.zero),
    .sign_i(r2.sign), .zero_sign_i(r2.zsign), .e_i(e_fin), .frac_i(frac),
    .of_i(of), .uf_i(uf), .o_o(o)
  );

  // ---------------------------------------------------------------- pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s1, s2, s3, s4, s5, s6, s7} <= '0;
      for (int i = 2; i <= 9; i++) m_d[i] <= '0;
      {ps, r1, r2} <= '0;
    end else begin
      // 1: unpack
      s1    <= '0;
      s1.ua <= ua;
      s1.ub <= ub;
      s1.sp <= sp;
      // add path
      s2      <= s1;
      s2.diff <= e_diff;
      s2.ebig <= e_big;
      s3 <= s2;
      s4 <= s3;
      s5         <= s4;
      s5.x       <= x27;
      s5.y       <= y27;
      s5.eff_sub <= eff_sub;
      s5.sign    <= add_sign;
      s5.zsign   <= add_zsign;
      s6 <= s5;
      s7 <= s6;
      // mul path
      m_d[2]       <= s1;
      m_d[2].emul  <= e_mul;
      m_d[2].sign  <= mul_sign;
      m_d[2].zsign <= mul_zsign;
      for (int i = 3; i <= 9; i++) m_d[i] <= m_d[i-1];
      // normalize (shared)
      ps.sp    <= pl_ps.sp;
      ps.m     <= n_m;
      ps.g     <= n_g;
      ps.st    <= n_st;
      ps.e     <= n_e;
      ps.zero  <= n_zero;
      ps.sign  <= pl_ps.sign;
      ps.zsign <= pl_ps.zsign;
      // round
      r1 <= ps;
      r2 <= r1;
    end
  end
endmodule
