// fp_round_shift: round to nearest, ties to even.
//
// Front half (before the array): the increment is guard AND (sticky OR the
// significand's last bit), the IEEE 754 default rounding. The 24-bit
// significand and the increment go to a 32-bit adder of the rAMM array.
// Back half (after the array): if the addition carried into bit 24 the
// significand was all ones and becomes 1.000..0 one binade up, so it is
// shifted right by one and ovf_o tells the exponent adjuster. frac_o is the
// 23-bit stored fraction. Both halves are combinational; they sit on either
// side of the array's two-cycle adder.
// Round-to-nearest-even and doing the increment on the array are published.
module fp_round_shift (
  input  logic [23:0] m_i,
  input  logic        g_i,
  input  logic        st_i,
  output logic [31:0] rnd_a_o,
  output logic [31:0] rnd_b_o,
  input  logic [32:0] rnd_res_i,
  output logic [22:0] frac_o,
  output logic        ovf_o
);
  always_comb begin
    rnd_a_o = {8'h00, m_i};
    rnd_b_o = {31'h0, g_i & (st_i | m_i[0])};
    ovf_o   = rnd_res_i[24];
    frac_o  = ovf_o ? rnd_res_i[23:1] : rnd_res_i[22:0];
  end
endmodule
