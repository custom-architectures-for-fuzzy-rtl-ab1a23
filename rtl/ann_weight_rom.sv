// ann_weight_rom: circular buffer of synaptic weights.
//
// S_WM signed 8-bit weights are read in a fixed circular order: the word at
// the read pointer is on w_o, and the pointer moves to the next word on every
// cycle with adv_i high, wrapping from S_WM-1 back to 0. restart_i sets the
// pointer to 0. The weights are stored in the order the microprogram consumes
// them: layer by layer, neuron by neuron, and within a neuron in the order of
// its inputs. A network whose weights repeat, such as a synchronous Hopfield
// net iterated several times, reuses them through the wrap-around.
// Contents come from WEIGHT_FILE ($readmemh, two hex digits per weight) when it
// is set; otherwise the built-in formula w(i) = ((29*i + 7) mod 256) - 128 is
// used. The circular ROM follows the architecture; the built-in formula,
// the file option and restart_i are this design's choices.
module ann_weight_rom
  import ann_pkg::*;
#(
  parameter int unsigned S_WM        = 51,
  parameter string       WEIGHT_FILE = ""
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  restart_i,  // pointer back to the first weight
  input  logic  adv_i,      // consume the current weight
  output data_t w_o
);

  localparam int unsigned AW = (S_WM > 1) ? $clog2(S_WM) : 1;

  data_t          rom [S_WM];
  logic [AW-1:0]  ptr_q;

  initial begin
    for (int i = 0; i < S_WM; i++) rom[i] = data_t'(((29 * i + 7) % 256) - 128);
    if (WEIGHT_FILE != "") $readmemh(WEIGHT_FILE, rom);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || restart_i)  ptr_q <= '0;
    else if (adv_i)           ptr_q <= (ptr_q == AW'(S_WM - 1)) ? '0 : ptr_q + 1'b1;
  end

  assign w_o = rom[ptr_q];

endmodule
