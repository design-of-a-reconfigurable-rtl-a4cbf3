// Shared types and constants of the reconfigurable floating-point unit.
//
// The 6-bit instruction word selects the mode: bits [5:4] choose integer
// (00), FP add (01), FP sub (10) or FP mul (11). In integer mode bit 3 picks
// adder (0) or multiplier (1), bit 2 picks add/sub (adder) or
// unsigned/signed (multiplier), and bits [1:0] the operand size. The field
// layout follows the published instruction format; the numeric latencies are
// the published pipeline depths. The array configuration enum, the cell
// control record and the FP stage records are this design's own.
package rfpu_pkg;

  localparam int unsigned NCELL = 16;   // rAMM cells in the array
  localparam int unsigned DW    = 256;  // width of A, B and O

  typedef enum logic [3:0] {
    CFG_ADD8  = 4'd0,  // 32 x 8-bit add/sub
    CFG_ADD16 = 4'd1,  // 16 x 16-bit add/sub
    CFG_ADD32 = 4'd2,  // 8 x 32-bit add/sub
    CFG_ADD64 = 4'd3,  // 4 x 64-bit add/sub
    CFG_MUL8  = 4'd4,  // 16 x 8-bit mul / MAC
    CFG_MUL16 = 4'd5,  // 4 x 16-bit mul
    CFG_MUL24 = 4'd6,  // 1 x 24-bit mul
    CFG_MUL32 = 4'd7,  // 1 x 32-bit mul
    CFG_FPADD = 4'd8,  // IEEE single add/sub
    CFG_FPMUL = 4'd9   // IEEE single mul
  } cfg_e;

  // Instruction word fields
  typedef struct packed {
    logic [1:0] mode;   // 00 int, 01 fadd, 10 fsub, 11 fmul
    logic       mul;    // integer: 0 adder, 1 multiplier
    logic       op;     // adder: 0 add / 1 sub; multiplier: 0 unsigned / 1 signed
    logic [1:0] size;   // adder: 8/16/32/64 bits; multiplier: 8/16/24/32 bits
  } inst_t;

  function automatic cfg_e inst2cfg(inst_t i);
    case (i.mode)
      2'b01, 2'b10: return CFG_FPADD;
      2'b11:        return CFG_FPMUL;
      default:      return i.mul ? cfg_e'({2'b01, i.size}) : cfg_e'({2'b00, i.size});
    endcase
  endfunction

  // Cycles from the issue edge to the edge that makes the result visible on O.
  function automatic int unsigned cfg_latency(cfg_e c);
    case (c)
      CFG_ADD8, CFG_ADD16: return 1;
      CFG_ADD32, CFG_MUL8: return 2;
      CFG_ADD64:           return 4;
      CFG_MUL16:           return 5;
      CFG_MUL24:           return 8;
      CFG_MUL32:           return 10;
      CFG_FPADD:           return 10;
      default:             return 12;
    endcase
  endfunction

  // Control of one rAMM cell, produced by its function decoder.
  typedef struct packed {
    logic       active;   // cell takes part in the current configuration
    logic       mul;      // 1: two-stage multiply-add, 0: one-stage adder
    logic       split8;   // adder works as two independent 8-bit adders
    logic       chain;    // carry-in comes from the cell below (registered)
    logic [2:0] in_dly;   // operand delay before the cell starts (0..6)
    logic [3:0] out_dly;  // delay of the result before it reaches O (0..8)
    logic [2:0] k;        // multiply: digits per operand (1..4)
    logic [1:0] row;      // multiply: multiplier digit j handled by this cell
    logic [1:0] col;      // multiply: multiplicand digit i handled by this cell
    logic [3:0] base;     // multiply: first cell of the group
  } cell_ctrl_t;

  // Unpacked single-precision operand
  typedef struct packed {
    logic        s;
    logic [7:0]  e;
    logic [23:0] m;      // hidden bit included; 0 for zero/denormal
    logic        zero;   // zero or denormal (flushed)
    logic        inf;
    logic        nan;
  } fp_opnd_t;

  // Result of special-case screening, fixed at unpack time
  typedef struct packed {
    logic        hit;    // result is decided by the special cases
    logic [31:0] value;
  } fp_special_t;

  localparam logic [31:0] FP_QNAN = 32'h7FC0_0000;

endpackage
