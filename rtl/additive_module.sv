// additive_module: adds the upper sum and carry words of a multi-cell
// multiply.
//
// The last row of a k x k multiplier grid leaves the upper half of the
// product as two words, S and Cw (see ramm_network). This block adds them,
// and for signed multiplies also subtracts the correction terms neg_a and
// neg_b (the upper half of a signed product is the unsigned one minus B when
// A < 0 and minus A when B < 0). The four operands are first reduced to two
// in carry-save form, then added in two registered 16-bit halves:
//   * res_lo_o, one cycle after s_i/c_i: bits [15:0] (enough for the 16-bit
//     multiply, whose upper half is 16 bits);
//   * res_o, two cycles after s_i/c_i: all 32 bits (24- and 32-bit multiply).
// The correction terms enter at issue time and wait dly_i cycles (2k) in an
// internal delay line, so they meet S and Cw of the same operation.
//
// The block itself is published; its split into two 16-bit pipeline halves
// is this design's way of meeting the published 5/8/10-cycle latencies.
module additive_module (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  dly_i,
  input  logic [31:0] s_i,
  input  logic [31:0] c_i,
  input  logic [31:0] neg_a_i,
  input  logic [31:0] neg_b_i,
  output logic [15:0] res_lo_o,
  output logic [31:0] res_o
);
  localparam int unsigned MAXD = 8;
  logic [63:0] taps [MAXD+1];
  logic [31:0] na, nb;

  assign taps[0] = {neg_a_i, neg_b_i};
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned d = 1; d <= MAXD; d++) taps[d] <= '0;
    end else begin
      for (int unsigned d = 1; d <= MAXD; d++) taps[d] <= taps[d-1];
    end
  end
  assign {na, nb} = taps[(dly_i > 4'(MAXD)) ? MAXD : 32'(dly_i)];

  // 4:2 carry-save reduction of S + Cw + ~na + ~nb (+2 added below)
  logic [31:0] x, y, p, q;
  always_comb begin
    x = s_i ^ c_i ^ ~na;
    y = ((s_i & c_i) | (s_i & ~na) | (c_i & ~na)) << 1;
    p = x ^ y ^ ~nb;
    q = ((x & y) | (x & ~nb) | (y & ~nb)) << 1;
  end

  logic [16:0] lo_sum;
  assign lo_sum = {1'b0, p[15:0]} + {1'b0, q[15:0]} + 17'd2;

  logic [15:0] lo_r, lo_rr, ph_r, qh_r, hi_r;
  logic        cy_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_r  <= '0;
      lo_rr <= '0;
      ph_r  <= '0;
      qh_r  <= '0;
      cy_r  <= 1'b0;
      hi_r  <= '0;
    end else begin
      lo_r  <= lo_sum[15:0];
      cy_r  <= lo_sum[16];
      ph_r  <= p[31:16];
      qh_r  <= q[31:16];
      lo_rr <= lo_r;
      hi_r  <= ph_r + qh_r + 16'(cy_r);
    end
  end
  assign res_lo_o = lo_r;
  assign res_o    = {hi_r, lo_rr};
endmodule
