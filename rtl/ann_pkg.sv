// ann_pkg: types and constants shared by the time-multiplexed neural network.
//
// The datapath is 8 bits wide for data and weights, the multiplier produces a
// 16-bit product and the accumulator and activation-function input are 16 bits,
// as the architecture specifies. The four cell operations of the data/results
// row (rotate, no operation, shift, load) are coded on 2 bits each; the
// particular code values are this design's choice.
package ann_pkg;

  localparam int unsigned DW   = 8;   // data and weight width
  localparam int unsigned PW   = 16;  // product / accumulator width
  localparam int unsigned MAX_LAYERS = 8;  // size of the layer-size list parameter

  // Per-cell operation of the data/results row.
  typedef enum logic [1:0] {
    OP_NOP   = 2'b00,  // cell keeps its value
    OP_ROT   = 2'b01,  // cell receives the row output (last cell)
    OP_SHIFT = 2'b10,  // cell receives the value of its left neighbour
    OP_LOAD  = 2'b11   // cell receives activation result or input datum
  } row_op_e;

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [PW-1:0] acc_t;

endpackage
