// fp_post_shift: normalization of the significand.
//
// A zero-leading counter finds the first one of the 48-bit significand and a
// barrel shifter moves it to bit 47. The normalized value is cut into the
// 24-bit significand, the guard bit (next bit) and the sticky bit (OR of the
// rest); the exponent is corrected by 1 - (leading zeros), because a value
// whose leading one is at bit 46 is already normal (see fp_addmul).
// zero_o flags an all-zero significand (exact cancellation). Combinational.
// ZLC plus barrel shift is the published structure.
module fp_post_shift (
  input  logic [47:0]       sig_i,
  input  logic signed [9:0] e_i,
  output logic [23:0]       m_o,
  output logic              g_o,
  output logic              st_o,
  output logic signed [9:0] e_o,
  output logic              zero_o
);
  logic [5:0]  lz;
  logic [47:0] n;
  always_comb begin
    lz = 6'd48;
    for (int i = 0; i < 48; i++)
      if (sig_i[i]) lz = 6'(47 - i);
    n      = sig_i << lz;
    m_o    = n[47:24];
    g_o    = n[23];
    st_o   = |n[22:0];
    e_o    = e_i + 10'sd1 - $signed({4'b0, lz});
    zero_o = (sig_i == '0);
  end
endmodule
