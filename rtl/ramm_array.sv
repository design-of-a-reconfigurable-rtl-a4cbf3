// ramm_array: the reconfigurable AMM array.
//
// Sixteen rAMM cells, the data input, the interconnection network, four
// additive modules and the output switch. One configuration (cfg_i) is
// active at a time; within it the array is fully pipelined and accepts a new
// operation every cycle. Latency from the issue edge to O, per configuration:
//   32 x 8-bit add/sub     1      16 x 8-bit mul/MAC   2
//   16 x 16-bit add/sub    1       4 x 16-bit mul      5
//    8 x 32-bit add/sub    2       1 x 24-bit mul      8
//    4 x 64-bit add/sub    4       1 x 32-bit mul     10
// A k-digit multiply uses k*k cells: 2 cycles per row of cells, then 1
// (k = 2) or 2 (k = 3, 4) cycles in the additive module. A 2^n-slice adder
// ripples its carry through registers, one cycle per 16-bit slice.
// In FP configurations the array serves the FP datapath: three 32-bit
// adders (cells 10..15, 2 cycles each) for FP add/sub, or the 24-bit
// multiplier (cells 0..8) and the rounding adder (cells 14/15) for FP mul.
//
// The caller must keep cfg_i stable while operations are in flight (the
// top-level issue logic drains the array before it changes configuration).
// The cell counts, the operation set and the latencies are the published
// ones; see the submodules for what is this design's own.
module ramm_array
  import rfpu_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  cfg_e         cfg_i,
  input  logic [255:0] a_i,
  input  logic [255:0] b_i,
  input  logic         op_i,
  input  logic [31:0]  cmp_a_i,
  input  logic [31:0]  cmp_b_i,
  input  logic [31:0]  am_a_i,
  input  logic [31:0]  am_b_i,
  input  logic         am_sub_i,
  input  logic [31:0]  rnd_a_i,
  input  logic [31:0]  rnd_b_i,
  output logic [255:0] o_o,
  output logic [32:0]  cmp_o,
  output logic [32:0]  am_o,
  output logic [32:0]  rnd_o
);
  logic [15:0] ca [NCELL], cb [NCELL], cw [NCELL], w [NCELL], res [NCELL];
  logic        cop [NCELL], cout [NCELL], cin [NCELL];
  logic [7:0]  c [NCELL];
  cell_ctrl_t  ctrl [NCELL];
  logic [31:0] neg_a [4], neg_b [4], add_s [4], add_c [4], add_res [4];
  logic [15:0] add_lo [4];

  data_input u_din (
    .cfg_i, .a_i, .b_i, .op_i, .cmp_a_i, .cmp_b_i, .am_a_i, .am_b_i, .am_sub_i,
    .rnd_a_i, .rnd_b_i, .ca_o(ca), .cb_o(cb), .cop_o(cop), .cw_o(cw),
    .neg_a_o(neg_a), .neg_b_o(neg_b)
  );

  for (genvar r = 0; r < NCELL; r++) begin : g_cell
    ramm_cell #(.IDX(r)) u_cell (
      .clk, .rst_n, .cfg_i, .a_i(ca[r]), .b_i(cb[r]), .op_i(cop[r]), .c_i(c[r]),
      .w_i(w[r]), .chain_cin_i(cin[r]), .ctrl_o(ctrl[r]), .res_o(res[r]), .cout_o(cout[r])
    );
  end

  ramm_network u_net (
    .cfg_i, .ctrl_i(ctrl), .res_i(res), .cout_i(cout), .mac_w_i(cw),
    .c_o(c), .w_o(w), .chain_cin_o(cin), .add_s_o(add_s), .add_c_o(add_c)
  );

  // correction delay = 2k cycles, the time the k rows of cells take
  logic [3:0] add_dly;
  always_comb begin
    case (cfg_i)
      CFG_MUL16:            add_dly = 4'd4;
      CFG_MUL24, CFG_FPMUL: add_dly = 4'd6;
      default:              add_dly = 4'd8;
    endcase
  end

  for (genvar g = 0; g < 4; g++) begin : g_add
    additive_module u_add (
      .clk, .rst_n, .dly_i(add_dly), .s_i(add_s[g]), .c_i(add_c[g]),
      .neg_a_i(neg_a[g]), .neg_b_i(neg_b[g]), .res_lo_o(add_lo[g]), .res_o(add_res[g])
    );
  end

  output_switch u_osw (
    .clk, .rst_n, .cfg_i, .ctrl_i(ctrl), .res_i(res), .cout_i(cout),
    .add_lo_i(add_lo), .add_res_i(add_res), .o_o, .cmp_o, .am_o, .rnd_o
  );
endmodule
