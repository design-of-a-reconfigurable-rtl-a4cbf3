// fun_decoder: function decoder of one rAMM cell.
//
// Every cell owns one decoder, specialised by the cell's position IDX. From
// the array configuration it derives the cell's control record: whether the
// cell multiplies or adds, whether its adder is split into two bytes,
// whether its carry-in comes from the cell below, how long its operands are
// delayed before it starts and how long its result is delayed before it
// reaches the output, and, for multiplies, which digit pair (col i, row j)
// of which cell group it computes. Combinational.
//
// Cell groups follow the published cell counts: 2 cells per 32-bit add, 4
// per 64-bit add, 4 per 16-bit multiply, 9 per 24-bit and 16 per 32-bit
// multiply. The numbering inside a group (cell = base + j*k + i), the
// operand delays (j*2 cycles for multiply row j, p cycles for adder slice p)
// and the placement of the FP-mode adders on cells 10..15 are this design's
// choices. In FP add mode cells 10/11 compare significands, 12/13 add them
// and 14/15 round; in FP multiply mode cells 0..8 multiply and 14/15 round.
module fun_decoder
  import rfpu_pkg::*;
#(
  parameter int unsigned IDX = 0
) (
  input  cfg_e       cfg_i,
  output cell_ctrl_t ctrl_o
);
  function automatic cell_ctrl_t adder(int unsigned p, int unsigned n);
    cell_ctrl_t c;
    c = '0;
    c.active  = 1'b1;
    c.chain   = (p != 0);
    c.in_dly  = 3'(p);
    c.out_dly = 4'(n - 1 - p);
    return c;
  endfunction

  function automatic cell_ctrl_t mult(int unsigned k, int unsigned base);
    cell_ctrl_t c;
    int unsigned loc, i, j;
    c    = '0;
    loc  = IDX - base;
    i    = loc % k;
    j    = loc / k;
    c.active  = 1'b1;
    c.mul     = 1'b1;
    c.k       = 3'(k);
    c.row     = 2'(j);
    c.col     = 2'(i);
    c.base    = 4'(base);
    c.in_dly  = 3'(2 * j);
    // low product byte j is ready 2(j+1) cycles after issue
    if (i == 0) c.out_dly = 4'(cfg_latency_k(k) - 2 * (j + 1));
    return c;
  endfunction

  function automatic int unsigned cfg_latency_k(int unsigned k);
    case (k)
      1:       return 2;
      2:       return 5;
      3:       return 8;
      default: return 10;
    endcase
  endfunction

  always_comb begin
    ctrl_o = '0;
    case (cfg_i)
      CFG_ADD8:  begin ctrl_o = adder(0, 1); ctrl_o.split8 = 1'b1; end
      CFG_ADD16: ctrl_o = adder(0, 1);
      CFG_ADD32: ctrl_o = adder(IDX % 2, 2);
      CFG_ADD64: ctrl_o = adder(IDX % 4, 4);
      CFG_MUL8:  ctrl_o = mult(1, IDX);
      CFG_MUL16: ctrl_o = mult(2, (IDX / 4) * 4);
      CFG_MUL24: if (IDX < 9) ctrl_o = mult(3, 0);
      CFG_MUL32: ctrl_o = mult(4, 0);
      CFG_FPADD: if (IDX >= 10) ctrl_o = adder(IDX % 2, 2);
      CFG_FPMUL: begin
        if (IDX < 9)        ctrl_o = mult(3, 0);
        else if (IDX >= 14) ctrl_o = adder(IDX % 2, 2);
      end
      default: ctrl_o = '0;
    endcase
  end
endmodule
