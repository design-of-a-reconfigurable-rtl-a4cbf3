// output_switch: time alignment and output assembly of the rAMM array.
//
// Parts of one result leave different cells at different times: the low
// slice of a chained adder is ready before the high slice, and low product
// byte j of a multiplier is ready 2(j+1) cycles after issue while the upper
// half comes last from the additive module. Each cell's result therefore
// passes a delay line, tapped at the cell's out_dly, so all parts of a result
// reach the output in the same cycle. The switch then places them on O:
//   * adders and 8-bit multiply: cell r drives O[16r+:16];
//   * 16-bit multiply group g: O[32g+:32] = {upper 16 bits, byte1, byte0};
//   * 24-bit multiply (also the FP significand product): O[47:0];
//   * 32-bit multiply: O[63:0].
// In FP modes it also returns the 33-bit results (carry-out, 32-bit sum) of
// the adders on cell pairs 10/11, 12/13 and 14/15. O is combinational from
// registers.
//
// The output switch is named in the published array; how it works here is
// this design's own.
module output_switch
  import rfpu_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  cfg_e         cfg_i,
  input  cell_ctrl_t   ctrl_i [NCELL],
  input  logic [15:0]  res_i [NCELL],
  input  logic         cout_i [NCELL],
  input  logic [15:0]  add_lo_i [4],
  input  logic [31:0]  add_res_i [4],
  output logic [255:0] o_o,
  output logic [32:0]  cmp_o,
  output logic [32:0]  am_o,
  output logic [32:0]  rnd_o
);
  localparam int unsigned MAXD = 8;
  logic [15:0] dl [NCELL][MAXD+1];
  logic [15:0] rd [NCELL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < NCELL; r++)
        for (int unsigned d = 1; d <= MAXD; d++) dl[r][d] <= '0;
    end else begin
      for (int unsigned r = 0; r < NCELL; r++)
        for (int unsigned d = 1; d <= MAXD; d++) dl[r][d] <= dl[r][d-1];
    end
  end
  always_comb begin
    for (int unsigned r = 0; r < NCELL; r++) begin
      dl[r][0] = res_i[r];
      rd[r]    = dl[r][(ctrl_i[r].out_dly > 4'(MAXD)) ? MAXD : 32'(ctrl_i[r].out_dly)];
    end
  end

  always_comb begin
    o_o = '0;
    case (cfg_i)
      CFG_MUL16:
        for (int unsigned g = 0; g < 4; g++)
          o_o[32*g +: 32] = {add_lo_i[g], rd[4*g+2][7:0], rd[4*g][7:0]};
      CFG_MUL24, CFG_FPMUL:
        o_o[47:0] = {add_res_i[0][23:0], rd[6][7:0], rd[3][7:0], rd[0][7:0]};
      CFG_MUL32:
        o_o[63:0] = {add_res_i[0], rd[12][7:0], rd[8][7:0], rd[4][7:0], rd[0][7:0]};
      CFG_FPADD: o_o = '0;
      default:
        for (int unsigned r = 0; r < NCELL; r++) o_o[16*r +: 16] = rd[r];
    endcase
    cmp_o = {cout_i[11], rd[11], rd[10]};
    am_o  = {cout_i[13], rd[13], rd[12]};
    rnd_o = {cout_i[15], rd[15], rd[14]};
  end
endmodule
