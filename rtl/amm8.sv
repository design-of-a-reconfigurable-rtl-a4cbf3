// amm8: 8-bit additive multiply module (AMM), multiple forming and
// partial-product reduction.
//
// Computes A*B + C + W (A, B, C 8 bits, W 16 bits) and leaves the result in
// redundant carry-save form: sum_o + carry_o equals the result modulo 2^16.
// The multiple-forming circuit is a row of AND gates per multiplier bit; the
// reduction tree is a chain of 3:2 carry-save adders that takes the eight
// partial products and the two addends. The redundant-to-binary conversion
// is left to the caller (inside the rAMM cell it is the cell's fast adder),
// so the cell can put a pipeline register between reduction and conversion.
//
// The AMM structure and the 16-bit W addend follow the published design. The
// signed option is this design's own: when sgn_i is set A and B are two's
// complement numbers, and two correction rows -(a7*B)<<8 and -(b7*A)<<8 are
// added into the tree (Baugh-Wooley style), which gives the exact signed
// product modulo 2^16. Purely combinational.
module amm8 (
  input  logic [7:0]  a_i,
  input  logic [7:0]  b_i,
  input  logic [7:0]  c_i,
  input  logic [15:0] w_i,
  input  logic        sgn_i,
  output logic [15:0] sum_o,
  output logic [15:0] carry_o
);
  localparam int unsigned NROWS = 13;
  logic [15:0] rows [NROWS];

  always_comb begin
    // multiple forming: AND gates
    for (int unsigned i = 0; i < 8; i++)
      rows[i] = 16'({a_i & {8{b_i[i]}}}) << i;
    rows[8]  = {8'h00, c_i};
    rows[9]  = w_i;
    // signed correction rows (two's complement negation split into ~x and +1)
    rows[10] = (sgn_i && a_i[7]) ? ~{b_i, 8'h00} : 16'h0000;
    rows[11] = (sgn_i && b_i[7]) ? ~{a_i, 8'h00} : 16'h0000;
    rows[12] = 16'(sgn_i && a_i[7]) + 16'(sgn_i && b_i[7]);
  end

  always_comb begin
    logic [15:0] s, c, x;
    s = rows[0];
    c = rows[1];
    for (int unsigned r = 2; r < NROWS; r++) begin
      x = rows[r];
      {s, c} = {s ^ c ^ x, ((s & c) | (s & x) | (c & x)) << 1};
    end
    sum_o   = s;
    carry_o = c;
  end
endmodule
