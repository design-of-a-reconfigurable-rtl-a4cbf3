// fp_addmul: the addMul block, the significand operation of the FP unit.
//
// For addition it hands the two 27-bit aligned significands to a 32-bit
// adder of the rAMM array (add or subtract, the larger one first so the
// result is never negative); for multiplication the 24-bit significands are
// multiplied by nine cells of the array, outside this block. When the array
// returns, the block brings both kinds of result into one 48-bit format for
// the normalizer, with the leading one of a normal value at bit 46 (bit 47
// set means the value is 2 or more):
//   add: sig = {27 + 1 carry bits, 20 zero bits}, exponent = larger exponent
//   mul: sig = the 48-bit product, exponent = ea + eb - 127
// Combinational. The published block performs the 27-bit add/sub or 24-bit
// multiply on the array; the common output format is this design's.
module fp_addmul (
  input  logic              fmul_i,
  // operands towards the array (addition)
  input  logic [26:0]       x_i,
  input  logic [26:0]       y_i,
  input  logic              eff_sub_i,
  output logic [31:0]       am_a_o,
  output logic [31:0]       am_b_o,
  output logic              am_sub_o,
  // results back from the array
  input  logic [32:0]       am_res_i,
  input  logic [47:0]       prod_i,
  input  logic [7:0]        ebig_i,
  input  logic signed [9:0] emul_i,
  output logic [47:0]       sig_o,
  output logic signed [9:0] e_o
);
  always_comb begin
    am_a_o   = {5'b0, x_i};
    am_b_o   = {5'b0, y_i};
    am_sub_o = eff_sub_i;
    if (fmul_i) begin
      sig_o = prod_i;
      e_o   = emul_i;
    end else begin
      sig_o = {am_res_i[27:0], 20'h0};
      e_o   = $signed({2'b00, ebig_i});
    end
  end
endmodule
