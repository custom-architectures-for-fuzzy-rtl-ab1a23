// ann_output: output register of the neural network.
//
// Holds one 8-bit result per output neuron. When we_i is high the activation
// result on d_i is written into entry idx_i; the entries are cleared by reset
// and hold their value otherwise, so the outputs of the last decision stay
// visible while the next one is computed. The output block is named in the
// architecture; its register-file form is this design's choice.
module ann_output
  import ann_pkg::*;
#(
  parameter int unsigned N_OUT = 3
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  we_i,
  input  logic [(N_OUT > 1 ? $clog2(N_OUT) : 1)-1:0] idx_i,
  input  data_t                                 d_i,
  output data_t                                 y_o [N_OUT]
);

  data_t y_q [N_OUT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_OUT; i++) y_q[i] <= '0;
    end else if (we_i) begin
      for (int i = 0; i < N_OUT; i++)
        if (int'(idx_i) == i) y_q[i] <= d_i;
    end
  end

  assign y_o = y_q;

endmodule
