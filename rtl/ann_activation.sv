// ann_activation: piecewise-linear sigmoid with power-of-two slopes.
//
// Maps a 16-bit signed neuron sum to an 8-bit signed activation. For x >= 0
// the curve is made of straight segments whose slopes are powers of two, so
// each segment is an offset plus a right shift:
//       0 ..  2047   ->        x >> 5          (0 .. 63)
//    2048 ..  4095   ->  64 + (x-2048) >> 6    (64 .. 95)
//    4096 ..  5119   ->  96 + (x-4096) >> 6    (96 .. 111)
//    5120 ..  8191   -> 112 + (x-5120) >> 8    (112 .. 123)
//    8192 .. 12287   -> 124 + (x-8192) >> 10   (124 .. 127)
//   12288 .. 32767   -> 127
// which reproduces the input and output ranges of the architecture's table
// (the slopes are read off those ranges). For x < 0 the curve is mirrored,
// y = -f(|x|), with |-32768| taken as 32767, so the output is odd-symmetric
// and lies in -127 .. 127; the mirroring is this design's choice. The result
// is registered when en_i is high and held otherwise (one cycle latency).
module ann_activation
  import ann_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en_i,    // capture f(x_i)
  input  acc_t  x_i,
  output data_t y_o
);

  function automatic logic [6:0] f_pos(input logic [14:0] m);
    logic [6:0] r;
    if (m < 15'd2048)       r = 7'(m >> 5);
    else if (m < 15'd4096)  r = 7'(15'd64  + ((m - 15'd2048) >> 6));
    else if (m < 15'd5120)  r = 7'(15'd96  + ((m - 15'd4096) >> 6));
    else if (m < 15'd8192)  r = 7'(15'd112 + ((m - 15'd5120) >> 8));
    else if (m < 15'd12288) r = 7'(15'd124 + ((m - 15'd8192) >> 10));
    else                    r = 7'd127;
    return r;
  endfunction

  logic [14:0] mag;
  data_t       y_d;

  always_comb begin
    if (x_i[PW-1]) begin
      // magnitude of a negative sum, -32768 saturating to 32767
      mag = (x_i == acc_t'(-32768)) ? 15'h7fff : 15'(-x_i);
      y_d = -data_t'({1'b0, f_pos(mag)});
    end else begin
      mag = x_i[14:0];
      y_d = data_t'({1'b0, f_pos(mag)});
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     y_o <= '0;
    else if (en_i)  y_o <= y_d;
  end

endmodule
