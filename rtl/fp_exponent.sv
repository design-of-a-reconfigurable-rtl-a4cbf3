// fp_exponent: the addSub_exponent block.
//
// For FP addition it subtracts the biased exponents (diff_o = ea - eb, the
// alignment distance and the order of the operands) and gives the larger one
// (ebig_o); for FP multiplication it adds them and removes one bias
// (emul_o = ea + eb - 127). Results are signed 10-bit so that exponents
// beyond the single-precision range survive until the final overflow and
// underflow checks. Combinational; the published function, this design's
// widths.
module fp_exponent (
  input  logic [7:0]        ea_i,
  input  logic [7:0]        eb_i,
  output logic signed [9:0] diff_o,
  output logic [7:0]        ebig_o,
  output logic signed [9:0] emul_o
);
  always_comb begin
    diff_o = $signed({2'b00, ea_i}) - $signed({2'b00, eb_i});
    ebig_o = (ea_i >= eb_i) ? ea_i : eb_i;
    emul_o = $signed({2'b00, ea_i}) + $signed({2'b00, eb_i}) - 10'sd127;
  end
endmodule
