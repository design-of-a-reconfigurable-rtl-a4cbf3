// data_input: operand distribution of the rAMM array.
//
// Splits the 256-bit A and B words into the slices each of the sixteen cells
// receives, according to the array configuration:
//   * adders: cell r gets A[16r+:16] and B[16r+:16]; op is add/sub.
//   * 8-bit multiply/MAC: cell r multiplies A[8r+:8] by B[8r+:8] and adds
//     the 16-bit W = {B[128+8r+:8], A[128+8r+:8]}; op is unsigned/signed.
//   * 16/24/32-bit multiply: cell (i, j) of a group gets multiplicand
//     digit i and multiplier digit j; the cells multiply unsigned digits and
//     the sign is corrected in the additive module, for which this block
//     also forms the two correction terms: -B if A is negative and -A if B is
//     negative, both taken modulo 2^32 (only the low N bits are used).
//   * FP modes: cells 10..15 take the 32-bit operands of the three FP
//     adders (compare, add/sub, round) from the FP datapath; cells 0..8 of
//     the FP multiply take the significands, which arrive on A/B.
// Combinational; the time skew between cells is applied inside each cell.
//
// That A and B are split into one 16-bit slice per cell follows the
// published array; the packing of the 8-bit MAC addend into the upper
// halves of A and B and the FP-mode cell assignment are this design's own.
module data_input
  import rfpu_pkg::*;
(
  input  cfg_e         cfg_i,
  input  logic [255:0] a_i,
  input  logic [255:0] b_i,
  input  logic         op_i,       // integer add/sub or unsigned/signed
  input  logic [31:0]  cmp_a_i,    // FP significand compare: cmp_a - cmp_b
  input  logic [31:0]  cmp_b_i,
  input  logic [31:0]  am_a_i,     // FP significand add/sub
  input  logic [31:0]  am_b_i,
  input  logic         am_sub_i,
  input  logic [31:0]  rnd_a_i,    // FP rounding increment
  input  logic [31:0]  rnd_b_i,
  output logic [15:0]  ca_o [NCELL],
  output logic [15:0]  cb_o [NCELL],
  output logic         cop_o [NCELL],
  output logic [15:0]  cw_o [NCELL],
  output logic [31:0]  neg_a_o [4],   // additive module g: subtract this (A negative)
  output logic [31:0]  neg_b_o [4]    // additive module g: subtract this (B negative)
);
  function automatic logic [7:0] byte_of(logic [255:0] v, int unsigned idx);
    return v[8*idx +: 8];
  endfunction

  always_comb begin
    for (int unsigned r = 0; r < NCELL; r++) begin
      ca_o[r]  = a_i[16*r +: 16];
      cb_o[r]  = b_i[16*r +: 16];
      cop_o[r] = op_i;
      cw_o[r]  = '0;
      case (cfg_i)
        CFG_MUL8: begin
          ca_o[r] = {8'h00, byte_of(a_i, r)};
          cb_o[r] = {8'h00, byte_of(b_i, r)};
          cw_o[r] = {byte_of(b_i, 16 + r), byte_of(a_i, 16 + r)};
        end
        CFG_MUL16: begin
          // group g = r/4, i = r%2, j = (r%4)/2
          ca_o[r]  = {8'h00, byte_of(a_i, 2 * (r / 4) + r % 2)};
          cb_o[r]  = {8'h00, byte_of(b_i, 2 * (r / 4) + (r % 4) / 2)};
          cop_o[r] = 1'b0;
        end
        CFG_MUL24, CFG_FPMUL: begin
          ca_o[r]  = {8'h00, byte_of(a_i, r % 3)};
          cb_o[r]  = {8'h00, byte_of(b_i, (r / 3) % 4)};
          cop_o[r] = 1'b0;
          if (cfg_i == CFG_FPMUL && r >= 14) begin
            ca_o[r]  = rnd_a_i[16*(r-14) +: 16];
            cb_o[r]  = rnd_b_i[16*(r-14) +: 16];
          end
        end
        CFG_MUL32: begin
          ca_o[r]  = {8'h00, byte_of(a_i, r % 4)};
          cb_o[r]  = {8'h00, byte_of(b_i, r / 4)};
          cop_o[r] = 1'b0;
        end
        CFG_FPADD: begin
          cop_o[r] = 1'b0;
          if (r == 10 || r == 11) begin
            ca_o[r]  = cmp_a_i[16*(r-10) +: 16];
            cb_o[r]  = cmp_b_i[16*(r-10) +: 16];
            cop_o[r] = 1'b1;
          end else if (r == 12 || r == 13) begin
            ca_o[r]  = am_a_i[16*(r-12) +: 16];
            cb_o[r]  = am_b_i[16*(r-12) +: 16];
            cop_o[r] = am_sub_i;
          end else if (r >= 14) begin
            ca_o[r]  = rnd_a_i[16*(r-14) +: 16];
            cb_o[r]  = rnd_b_i[16*(r-14) +: 16];
          end
        end
        default: ;
      endcase
    end
  end

  // sign corrections for the multi-cell multipliers
  always_comb begin
    logic [31:0] av, bv;
    logic        as, bs;
    for (int unsigned g = 0; g < 4; g++) begin
      av = '0;
      bv = '0;
      as = 1'b0;
      bs = 1'b0;
      case (cfg_i)
        CFG_MUL16: begin
          av = {16'h0, a_i[16*g +: 16]};
          bv = {16'h0, b_i[16*g +: 16]};
          as = av[15];
          bs = bv[15];
        end
        CFG_MUL24: begin
          av = {8'h0, a_i[23:0]};
          bv = {8'h0, b_i[23:0]};
          as = av[23];
          bs = bv[23];
        end
        CFG_MUL32: begin
          av = a_i[31:0];
          bv = b_i[31:0];
          as = av[31];
          bs = bv[31];
        end
        default: ;
      endcase
      neg_a_o[g] = (op_i && as) ? bv : '0;
      neg_b_o[g] = (op_i && bs) ? av : '0;
    end
  end
endmodule
