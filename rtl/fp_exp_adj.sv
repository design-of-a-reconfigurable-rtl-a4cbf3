// fp_exp_adj: final exponent adjustment.
//
// Adds the rounding carry to the normalized exponent and checks the range of
// single precision: 255 or more overflows (result becomes infinity), 0 or
// less underflows (result is flushed to zero, as denormals are not
// produced). Combinational. The adjustment is published; the flush to zero
// is this design's choice.
module fp_exp_adj (
  input  logic signed [9:0] e_i,
  input  logic              ovf_i,
  output logic [7:0]        e_o,
  output logic              of_o,
  output logic              uf_o
);
  logic signed [9:0] ef;
  always_comb begin
    ef   = e_i + $signed({9'b0, ovf_i});
    of_o = (ef >= 10'sd255);
    uf_o = (ef <= 10'sd0);
    e_o  = ef[7:0];
  end
endmodule
