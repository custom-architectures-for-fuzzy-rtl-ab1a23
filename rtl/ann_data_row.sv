// ann_data_row: the data/results row of the neural network datapath.
//
// A row of L cells of 8 bits. The row output, which feeds the multiplier, is
// the rightmost cell (index L-1). Every cycle each cell applies its own 2-bit
// operation from the microinstruction register:
//   OP_NOP   keep the value
//   OP_ROT   take the row output (recirculates data for the next neuron)
//   OP_SHIFT take the value of the cell on its left (cell 0 takes zero)
//   OP_LOAD  take load_i (activation-function result or an input datum)
// All cells update on the same clock edge, so a rotation of a group of cells
// (OP_ROT on its leftmost cell, OP_SHIFT on the others) is a circular shift.
// The four operations and the output at the right end follow the architecture;
// the zero shifted into cell 0 and the synchronous active-low reset to zero are
// choices of this design.
module ann_data_row
  import ann_pkg::*;
#(
  parameter int unsigned L = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  row_op_e  op_i   [L],  // per-cell operation for this cycle
  input  data_t    load_i,      // value for cells with OP_LOAD
  output data_t    row_o,       // row output = cell L-1
  output data_t    cells_o [L]  // all cells, for observation
);

  data_t cell_q [L];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < L; c++) cell_q[c] <= '0;
    end else begin
      for (int c = 0; c < L; c++) begin
        unique case (op_i[c])
          OP_NOP:   cell_q[c] <= cell_q[c];
          OP_ROT:   cell_q[c] <= cell_q[L-1];
          OP_SHIFT: cell_q[c] <= (c == 0) ? data_t'(0) : cell_q[(c == 0) ? 0 : c-1];
          OP_LOAD:  cell_q[c] <= load_i;
          default:  cell_q[c] <= cell_q[c];
        endcase
      end
    end
  end

  assign row_o   = cell_q[L-1];
  assign cells_o = cell_q;

endmodule
