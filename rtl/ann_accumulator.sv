// ann_accumulator: 16-bit accumulator behind the multiplier.
//
// On each valid product the accumulator either restarts from that product
// (clr_i, the reset the control unit gives at the first input of a neuron) or
// adds the product to its value. The sum saturates at the limits of the 16-bit
// signed range instead of wrapping. last_i marks the final product of a
// neuron; it is registered with the sum so that last_o is high in the cycle the
// finished neuron sum sits on acc_o. Latency is one cycle. The 16-bit width and
// the reset from the control unit follow the architecture; saturation is this
// design's choice.
module ann_accumulator
  import ann_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid_i,   // p_i holds a product
  input  logic clr_i,     // start a new neuron sum with p_i
  input  logic last_i,    // p_i is the last product of the neuron
  input  acc_t p_i,
  output acc_t acc_o,
  output logic last_o     // acc_o is a finished neuron sum
);

  localparam logic signed [PW:0] SUM_MAX = (PW+1)'(2**(PW-1) - 1);
  localparam logic signed [PW:0] SUM_MIN = -(PW+1)'(2**(PW-1));

  acc_t acc_q;
  logic last_q;
  logic signed [PW:0] sum;

  always_comb begin
    sum = (clr_i ? (PW+1)'(0) : (PW+1)'(acc_q)) + (PW+1)'(p_i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q  <= '0;
      last_q <= 1'b0;
    end else begin
      last_q <= valid_i && last_i;
      if (valid_i) begin
        if (sum > SUM_MAX)
          acc_q <= acc_t'(SUM_MAX);
        else if (sum < SUM_MIN)
          acc_q <= acc_t'(SUM_MIN);
        else
          acc_q <= acc_t'(sum);
      end
    end
  end

  assign acc_o  = acc_q;
  assign last_o = last_q;

endmodule
