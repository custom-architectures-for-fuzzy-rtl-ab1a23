// controllers_top: the fuzzy logic controller and the neural network
// controller side by side.
//
// The two controllers are independent designs that share only the clock and
// reset; each keeps its own start/done handshake and data ports (see flc_top
// and ann_top). Defaults: the fuzzy controller is sized for two inputs with 7
// and 5 membership functions and one output with 7 sets (35 rules); the
// neural network is the 4-4-5-3 feedforward net with an 8-cell data row and
// 51 weights.
module controllers_top
  import ann_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // fuzzy logic controller
  input  logic       flc_start_i,
  input  logic [7:0] flc_x_i [2],
  output logic       flc_busy_o,
  output logic       flc_done_o,
  output logic [7:0] flc_y_o [1],
  // neural network controller
  input  logic       ann_start_i,
  input  data_t      ann_x_i [4],
  output logic       ann_busy_o,
  output logic       ann_done_o,
  output data_t      ann_y_o [3]
);

  flc_top u_flc (
    .clk, .rst_n, .start_i(flc_start_i), .x_i(flc_x_i),
    .busy_o(flc_busy_o), .done_o(flc_done_o), .y_o(flc_y_o)
  );

  ann_top u_ann (
    .clk, .rst_n, .start_i(ann_start_i), .x_i(ann_x_i),
    .busy_o(ann_busy_o), .done_o(ann_done_o), .y_o(ann_y_o)
  );

endmodule
