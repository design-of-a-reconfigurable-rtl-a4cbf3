// rfa16: 16-bit reconfigurable fast adder (rFA) of a rAMM cell.
//
// Adds a_i + b_i + carry-in. With split_i clear it is one 16-bit adder
// (cin_lo_i enters bit 0, cout_o leaves bit 15). With split_i set the carry
// between bit 7 and bit 8 is cut and the two bytes are independent 8-bit
// adders, the upper one taking cin_hi_i. cout_lo_o is the carry out of bit 7
// in either mode. Combinational.
//
// That the rFA is one 16-bit or two 8-bit adders is the published function;
// the carry-in/carry-out ports that let cells be chained are this design's.
module rfa16 (
  input  logic [15:0] a_i,
  input  logic [15:0] b_i,
  input  logic        cin_lo_i,
  input  logic        cin_hi_i,
  input  logic        split_i,
  output logic [15:0] sum_o,
  output logic        cout_lo_o,
  output logic        cout_o
);
  logic [8:0] lo;
  logic [8:0] hi;
  always_comb begin
    lo = {1'b0, a_i[7:0]} + {1'b0, b_i[7:0]} + 9'(cin_lo_i);
    hi = {1'b0, a_i[15:8]} + {1'b0, b_i[15:8]} + 9'(split_i ? cin_hi_i : lo[8]);
    sum_o     = {hi[7:0], lo[7:0]};
    cout_lo_o = lo[8];
    cout_o    = hi[8];
  end
endmodule
