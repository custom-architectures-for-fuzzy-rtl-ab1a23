// ann_top: time-multiplexed neural network controller.
//
// One neuron's worth of hardware computes a whole layered network. A circular
// pipeline moves data from the data/results row through an 8x8 multiplier
// (the other operand comes from the circular weight ROM), a 16-bit accumulator
// and the activation function, and the activation result goes back into the
// row or into the output register. A microprogrammed control unit sets the
// operation of every row cell each cycle, so that the value leaving the row
// always meets its matching weight: one product per cycle.
//
// Interface: pulse start_i with the inputs on x_i (held until done_o); done_o
// pulses when all outputs are in y_o, which then holds them until the next
// run updates them. A run takes the microprogram length plus two cycles.
// Latency from a neuron's last product to its activation result is
// DLY = 16 (multiplier) + 1 (accumulator) + 1 (activation) = 18 cycles.
// Defaults are the architecture's example net of 4 inputs, hidden layers of 4
// and 5 neurons and 3 outputs, with L = 8 cells and 51 weights.
// ASYNC = 1 selects the asynchronous Hopfield program instead (see
// ann_control): LAYERS then holds the node count once per update sweep, plus
// once for the initial states.
// Two signals are left partly unread on purpose: the row's parallel cell view
// (cells), which is there for observation in simulation, and the top bits of
// the control unit's output index, which is as wide as the widest level
// while the output register needs only enough bits for the output count.
module ann_top
  import ann_pkg::*;
#(
  parameter int unsigned L           = 8,
  parameter int unsigned N_LAYERS    = 4,
  parameter int unsigned LAYERS [MAX_LAYERS] = '{4, 4, 5, 3, 0, 0, 0, 0},  // first N_LAYERS used
  parameter int unsigned S_WM        = 51,
  parameter string       WEIGHT_FILE = "",
  parameter bit          ASYNC       = 1'b0   // Hopfield net, sequential updating
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start_i,
  input  data_t x_i [LAYERS[0]],
  output logic  busy_o,
  output logic  done_o,
  output data_t y_o [LAYERS[N_LAYERS-1]]
);

  function automatic int max_layer();
    int m;
    m = 1;
    for (int l = 0; l < N_LAYERS; l++) if (int'(LAYERS[l]) > m) m = LAYERS[l];
    return m;
  endfunction

  localparam int unsigned N_IN  = LAYERS[0];
  localparam int unsigned N_OUT = LAYERS[N_LAYERS-1];
  localparam int unsigned IW    = (max_layer() > 1) ? $clog2(max_layer()) : 1;
  localparam int unsigned OW    = (N_OUT > 1) ? $clog2(N_OUT) : 1;
  localparam int unsigned DLY   = 2 * DW + 2;

  row_op_e       op [L];
  logic          src_in, mac, first, last, out_we, w_restart;
  logic [IW-1:0] in_idx, out_idx;
  data_t         row_out, weight, af_q, load_val;
  data_t         cells [L];
  acc_t          prod, acc;
  logic [2:0]    tag_out;
  logic          acc_last;

  ann_control #(
    .L(L), .N_LAYERS(N_LAYERS), .LAYERS(LAYERS), .DLY(DLY), .IW(IW), .ASYNC(ASYNC)
  ) u_ctrl (
    .clk, .rst_n, .start_i, .busy_o, .done_o,
    .op_o(op), .src_in_o(src_in), .in_idx_o(in_idx), .mac_o(mac),
    .first_o(first), .last_o(last), .out_we_o(out_we), .out_idx_o(out_idx),
    .w_restart_o(w_restart)
  );

  always_comb begin
    load_val = af_q;
    if (src_in) begin
      for (int k = 0; k < int'(N_IN); k++)
        if (int'(in_idx) == k) load_val = x_i[k];
    end
  end

  ann_data_row #(.L(L)) u_row (
    .clk, .rst_n, .op_i(op), .load_i(load_val), .row_o(row_out), .cells_o(cells)
  );

  ann_weight_rom #(.S_WM(S_WM), .WEIGHT_FILE(WEIGHT_FILE)) u_wrom (
    .clk, .rst_n, .restart_i(w_restart), .adv_i(mac), .w_o(weight)
  );

  ann_multiplier #(.TAG_W(3)) u_mul (
    .clk, .rst_n, .a_i(row_out), .b_i(weight), .tag_i({mac, first, last}),
    .p_o(prod), .tag_o(tag_out)
  );

  ann_accumulator u_acc (
    .clk, .rst_n, .valid_i(tag_out[2]), .clr_i(tag_out[1]), .last_i(tag_out[0]),
    .p_i(prod), .acc_o(acc), .last_o(acc_last)
  );

  ann_activation u_af (
    .clk, .rst_n, .en_i(acc_last), .x_i(acc), .y_o(af_q)
  );

  ann_output #(.N_OUT(N_OUT)) u_out (
    .clk, .rst_n, .we_i(out_we), .idx_i(OW'(out_idx)), .d_i(af_q), .y_o(y_o)
  );

endmodule
