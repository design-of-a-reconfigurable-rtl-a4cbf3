// fp_pre_module: significand ordering and alignment for FP addition.
//
// Puts the operand with the larger magnitude first (X) and shifts the other
// (Y) right by the exponent difference. When the exponents are equal the
// order comes from a 24-bit significand subtraction done on a 32-bit adder
// of the rAMM array (cmp_ge_i: carry-out of ma - mb, set when ma >= mb).
// Both significands are extended to 27 bits: 24 bits, guard, round and a
// sticky bit that collects everything shifted out of Y. eff_sub_o tells the
// following adder to subtract (operand signs differ). Multiplication
// bypasses this block. Combinational.
//
// The block's function and its use of the array for the comparison are
// published; the 27-bit guard/round/sticky format matches the published
// 27-bit addition.
module fp_pre_module (
  input  logic [23:0]       ma_i,
  input  logic [23:0]       mb_i,
  input  logic              sa_i,
  input  logic              sb_i,
  input  logic signed [9:0] diff_i,
  input  logic              cmp_ge_i,
  output logic [26:0]       x_o,
  output logic [26:0]       y_o,
  output logic              swap_o,
  output logic              eff_sub_o
);
  logic [9:0]  sh_abs;
  logic [4:0]  sh;
  logic [23:0] yv;
  logic [55:0] full;
  always_comb begin
    swap_o    = (diff_i < 0) || (diff_i == 0 && !cmp_ge_i);
    eff_sub_o = sa_i ^ sb_i;
    sh_abs    = (diff_i < 0) ? 10'(-diff_i) : 10'(diff_i);
    sh        = (sh_abs > 10'd31) ? 5'd31 : sh_abs[4:0];
    yv        = swap_o ? ma_i : mb_i;
    x_o       = {swap_o ? mb_i : ma_i, 3'b000};
    full      = {yv, 32'h0} >> sh;
    y_o       = {full[55:30], |full[29:0]};
  end
endmodule
