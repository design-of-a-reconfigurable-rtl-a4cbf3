// fp_unpack: instruction decode and operand unpacking.
//
// Decodes the 6-bit instruction word into the array configuration and the
// FP operation, and splits the two single-precision operands (A[31:0],
// B[31:0]) into sign, biased exponent and 24-bit significand with the hidden
// bit. For FP subtraction the sign of B is inverted here, so the rest of the
// datapath only adds. It also screens the special operands and decides the
// result outright where IEEE 754 fixes it: NaN in or invalid operation
// (inf - inf, inf * 0) gives the quiet NaN 7FC00000; an infinite operand
// gives a signed infinity; a zero factor gives a signed zero. Combinational.
//
// Decoding the instruction and separating the operands is the published
// job of this block. Denormal operands are treated as zero (flush to zero)
// and NaN results are the single default quiet NaN: both are this design's
// choices, as the published design does not discuss special values.
module fp_unpack
  import rfpu_pkg::*;
(
  input  inst_t       inst_i,
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output cfg_e        cfg_o,
  output logic        is_fp_o,
  output logic        fmul_o,
  output fp_opnd_t    ua_o,
  output fp_opnd_t    ub_o,
  output fp_special_t special_o
);
  function automatic fp_opnd_t unpack(logic [31:0] v, logic flip);
    fp_opnd_t u;
    u.s    = v[31] ^ flip;
    u.e    = v[30:23];
    u.zero = (v[30:23] == 8'h00);
    u.inf  = (v[30:23] == 8'hFF) && (v[22:0] == '0);
    u.nan  = (v[30:23] == 8'hFF) && (v[22:0] != '0);
    u.m    = u.zero ? 24'h0 : {1'b1, v[22:0]};
    return u;
  endfunction

  always_comb begin
    cfg_o   = inst2cfg(inst_i);
    is_fp_o = (inst_i.mode != 2'b00);
    fmul_o  = (inst_i.mode == 2'b11);
    ua_o    = unpack(a_i, 1'b0);
    ub_o    = unpack(b_i, inst_i.mode == 2'b10);
    special_o = '0;
    if (fmul_o) begin
      if (ua_o.nan || ub_o.nan || (ua_o.inf && ub_o.zero) || (ub_o.inf && ua_o.zero))
        special_o = '{hit: 1'b1, value: FP_QNAN};
      else if (ua_o.inf || ub_o.inf)
        special_o = '{hit: 1'b1, value: {ua_o.s ^ ub_o.s, 8'hFF, 23'h0}};
      else if (ua_o.zero || ub_o.zero)
        special_o = '{hit: 1'b1, value: {ua_o.s ^ ub_o.s, 31'h0}};
    end else begin
      if (ua_o.nan || ub_o.nan || (ua_o.inf && ub_o.inf && (ua_o.s != ub_o.s)))
        special_o = '{hit: 1'b1, value: FP_QNAN};
      else if (ua_o.inf)
        special_o = '{hit: 1'b1, value: {ua_o.s, 8'hFF, 23'h0}};
      else if (ub_o.inf)
        special_o = '{hit: 1'b1, value: {ub_o.s, 8'hFF, 23'h0}};
    end
  end
endmodule
