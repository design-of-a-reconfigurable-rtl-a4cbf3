// fp_sign: the sign block.
//
// Decides the sign of the FP result. Multiply: the exclusive OR of the
// operand signs. Add: the sign of the operand with the larger magnitude
// (swap_i is set when that is B, whose sign already includes the inversion
// of a subtraction). It also gives the sign to use when an addition cancels
// to exactly zero: under round-to-nearest-even that is +0, except that the
// sum of two zeros of the same sign keeps that sign. Combinational.
//
// The block's role is published; the rules are those of IEEE 754.
module fp_sign (
  input  logic fmul_i,
  input  logic sa_i,
  input  logic sb_i,
  input  logic swap_i,
  output logic sign_o,
  output logic zero_sign_o
);
  always_comb begin
    if (fmul_i) begin
      sign_o      = sa_i ^ sb_i;
      zero_sign_o = sa_i ^ sb_i;
    end else begin
      sign_o      = swap_i ? sb_i : sa_i;
      zero_sign_o = sa_i & sb_i;
    end
  end
endmodule
