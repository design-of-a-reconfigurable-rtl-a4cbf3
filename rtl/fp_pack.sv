// fp_pack: packs the result into the 256-bit output O.
//
// Integer operations pass the array's 256-bit result. FP operations put a
// single-precision word in O[31:0] (upper bits zero), chosen in priority
// order: the special-case result fixed at unpack time, a signed zero after
// exact cancellation, infinity on overflow, a signed zero on underflow, and
// otherwise {sign, exponent, fraction}. Combinational; packing FP or integer
// results into O is the published function.
module fp_pack
  import rfpu_pkg::*;
(
  input  logic         is_fp_i,
  input  logic [255:0] int_i,
  input  fp_special_t  special_i,
  input  logic         zero_i,
  input  logic         sign_i,
  input  logic         zero_sign_i,
  input  logic [7:0]   e_i,
  input  logic [22:0]  frac_i,
  input  logic         of_i,
  input  logic         uf_i,
  output logic [255:0] o_o
);
  logic [31:0] f;
  always_comb begin
    if (special_i.hit) f = special_i.value;
    else if (zero_i)   f = {zero_sign_i, 31'h0};
    else if (of_i)     f = {sign_i, 8'hFF, 23'h0};
    else if (uf_i)     f = {sign_i, 31'h0};
    else               f = {sign_i, e_i, frac_i};
    o_o = is_fp_i ? {224'h0, f} : int_i;
  end
endmodule
