// ramm_network: interconnection network of the rAMM array.
//
// Wires the cells together according to their function decoders:
//   * Multiply rows. A multi-cell multiply is a k x k grid of cells
//     (k = 2, 3, 4 digits of 8 bits). Cell (i, j) computes
//     a_i*b_j + C + W with C = low byte of cell (i+1, j-1) and
//     W = high byte of cell (i, j-1). All signals run from one row to the
//     next, never sideways inside a row, so every row is a clean pipeline
//     stage. Row 0 gets C = 0 and W = the MAC addend (zero except for the
//     8-bit MAC).
//   * Adder chains: a cell's chain carry-in is the registered carry-out of
//     the cell below it.
//   * Additive modules: after the last row (j = k-1) the upper half of the
//     product is the sum of two words, the sum word S = sum over i >= 1 of
//     lo(i, k-1) << 8(i-1) and the carry word Cw = sum over i of
//     hi(i, k-1) << 8i, which go to additive module g of the group.
// Combinational.
//
// The removal of horizontal propagation by adding additive modules is the
// published idea; this particular row-to-row wiring is this design's
// reading of it.
module ramm_network
  import rfpu_pkg::*;
(
  input  cfg_e        cfg_i,
  input  cell_ctrl_t  ctrl_i [NCELL],
  input  logic [15:0] res_i [NCELL],
  input  logic        cout_i [NCELL],
  input  logic [15:0] mac_w_i [NCELL],
  output logic [7:0]  c_o [NCELL],
  output logic [15:0] w_o [NCELL],
  output logic        chain_cin_o [NCELL],
  output logic [31:0] add_s_o [4],
  output logic [31:0] add_c_o [4]
);
  always_comb begin
    int unsigned k, i, j, base;
    for (int unsigned r = 0; r < NCELL; r++) begin
      k    = 32'(ctrl_i[r].k);
      i    = 32'(ctrl_i[r].col);
      j    = 32'(ctrl_i[r].row);
      base = 32'(ctrl_i[r].base);
      c_o[r] = '0;
      w_o[r] = '0;
      chain_cin_o[r] = (r == 0) ? 1'b0 : cout_i[(r+NCELL-1)%NCELL];
      if (ctrl_i[r].mul) begin
        if (j == 0) begin
          w_o[r] = mac_w_i[r];
        end else begin
          if (i + 1 < k) c_o[r] = res_i[(base + (j-1)*k + i + 1) % NCELL][7:0];
          w_o[r] = {8'h00, res_i[(base + (j-1)*k + i) % NCELL][15:8]};
        end
      end
    end
  end

  always_comb begin
    int unsigned k, base, last;
    for (int unsigned g = 0; g < 4; g++) begin
      add_s_o[g] = '0;
      add_c_o[g] = '0;
      k    = 0;
      base = 0;
      case (cfg_i)
        CFG_MUL16:            begin k = 2; base = 4 * g; end
        CFG_MUL24, CFG_FPMUL: if (g == 0) k = 3;
        CFG_MUL32:            if (g == 0) k = 4;
        default: ;
      endcase
      last = base + (k - 1) * k;   // first cell of the last row
      for (int unsigned i = 0; i < 4; i++) begin
        if (i < k) begin
          add_c_o[g] = add_c_o[g] + (32'(res_i[(last + i) % NCELL][15:8]) << (8 * i));
          if (i >= 1)
            add_s_o[g] = add_s_o[g] + (32'(res_i[(last + i) % NCELL][7:0]) << (8 * (i - 1)));
        end
      end
    end
  end
endmodule
