// ramm_cell: reconfigurable additive multiply module (rAMM) cell.
//
// A cell holds a function decoder, an 8-bit AMM reduction tree (amm8), a
// 16-bit reconfigurable fast adder (rfa16) and pipeline registers whose use
// depends on the function:
//   * multiply-add (ctrl.mul): stage 1 reduces A*B + C + W to carry-save
//     form and registers it; stage 2 converts it with the rFA and registers
//     the 16-bit result. Latency 2.
//   * adder: the rFA adds A and B (B inverted for subtraction) as one 16-bit
//     or two 8-bit adders and registers sum and carry-out. Latency 1.
// In front of both sits an operand delay line, so that a cell in row j of a
// multiplier, or slice p of a chained adder, starts exactly when the cells it
// depends on have finished (ctrl.in_dly cycles). In a chained adder the
// carry-in is the registered carry-out of the cell below (chain_cin_i).
//
// Interface: a_i/b_i are the cell's 16-bit operand slices (multiply uses the
// low byte), op_i is subtract (adder) or signed (multiply), travelling with
// the operands; c_i/w_i are the addends from the interconnect, already in
// step with the delayed operands. res_o/cout_o are registered; lo/hi bytes
// of res_o and cout_o are the cell's three network outputs.
//
// The two-stage multiply-add, one-stage adder and 16/8-bit split follow the
// published cell; the delay line and the carry chaining are this design's
// way of giving every function a full pipeline with no hazards. Registers
// reset to zero.
module ramm_cell
  import rfpu_pkg::*;
#(
  parameter int unsigned IDX = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_e        cfg_i,
  input  logic [15:0] a_i,
  input  logic [15:0] b_i,
  input  logic        op_i,
  input  logic [7:0]  c_i,
  input  logic [15:0] w_i,
  input  logic        chain_cin_i,
  output cell_ctrl_t  ctrl_o,
  output logic [15:0] res_o,
  output logic        cout_o
);
  localparam int unsigned MAXD = 6;

  typedef struct packed {
    logic        op;
    logic [15:0] a;
    logic [15:0] b;
  } opnd_t;

  cell_ctrl_t ctrl;
  opnd_t      taps [MAXD+1];
  opnd_t      cur;

  fun_decoder #(.IDX(IDX)) u_dec (.cfg_i(cfg_i), .ctrl_o(ctrl));
  assign ctrl_o = ctrl;

  // operand delay line
  assign taps[0] = '{op: op_i, a: a_i, b: b_i};
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned d = 1; d <= MAXD; d++) taps[d] <= '0;
    end else begin
      for (int unsigned d = 1; d <= MAXD; d++) taps[d] <= taps[d-1];
    end
  end
  assign cur = taps[ctrl.in_dly];

  // stage 1: multiple forming and carry-save reduction
  logic [15:0] csa_s, csa_c, s1_s, s1_c;
  amm8 u_amm (
    .a_i(cur.a[7:0]), .b_i(cur.b[7:0]), .c_i(c_i), .w_i(w_i), .sgn_i(cur.op),
    .sum_o(csa_s), .carry_o(csa_c)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_s <= '0;
      s1_c <= '0;
    end else begin
      s1_s <= csa_s;
      s1_c <= csa_c;
    end
  end

  // stage 2 (multiply) or only stage (adder): the rFA
  logic [15:0] fa_a, fa_b, fa_sum;
  logic        fa_cin, fa_cout, fa_cout_lo;
  always_comb begin
    if (ctrl.mul) begin
      fa_a   = s1_s;
      fa_b   = s1_c;
      fa_cin = 1'b0;
    end else begin
      fa_a   = cur.a;
      fa_b   = cur.b ^ {16{cur.op}};
      fa_cin = ctrl.chain ? chain_cin_i : cur.op;
    end
  end
  rfa16 u_rfa (
    .a_i(fa_a), .b_i(fa_b), .cin_lo_i(fa_cin), .cin_hi_i(ctrl.mul ? 1'b0 : cur.op),
    .split_i(ctrl.split8 && !ctrl.mul), .sum_o(fa_sum), .cout_lo_o(fa_cout_lo), .cout_o(fa_cout)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_o  <= '0;
      cout_o <= 1'b0;
    end else begin
      res_o  <= fa_sum;
      cout_o <= fa_cout;
    end
  end
  // the carry out of the low byte is not needed outside the cell
  logic unused_cout_lo;
  assign unused_cout_lo = fa_cout_lo;
endmodule
