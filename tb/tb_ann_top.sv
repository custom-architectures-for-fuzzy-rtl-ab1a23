// tb_ann_top: end-to-end test of the time-multiplexed neural network.
//
// Runs the default 4-4-5-3 feedforward net on random input vectors and compares
// every output with a reference model written here: per layer, each neuron sum
// is the saturating 16-bit accumulation of input*weight in input order, passed
// through the piecewise-linear activation of the architecture's table; weights
// follow the ROM's built-in formula. Also checks the decision time
// (start to done) against the schedule length worked out by hand: 4 input
// loads + 35 + 39 + 33 cycles for the three layers = 111 words, plus one cycle
// into the microinstruction register and one for done.
module tb_ann_top;
  import ann_pkg::*;

  localparam int NL = 4;
  localparam int LAY [NL] = '{4, 4, 5, 3};
  localparam int EXPECTED_CYCLES = 112;

  logic  clk = 0, rst_n = 0, start = 0, busy, done;
  data_t x [4];
  data_t y [3];
  int    checks = 0, failures = 0;

  ann_top dut (.clk, .rst_n, .start_i(start), .x_i(x), .busy_o(busy), .done_o(done), .y_o(y));

  always #5 clk = ~clk;

  function automatic int wgt(input int i);
    return ((29 * i + 7) % 256) - 128;
  endfunction

  function automatic int af(input int s);
    int m, r;
    m = (s < 0) ? -s : s;
    if (m > 32767) m = 32767;
    if (m <= 1023)       r = m / 32;            // 0..31
    else if (m <= 2047)  r = 32 + (m - 1024) / 32;
    else if (m <= 4095)  r = 64 + (m - 2048) / 64;
    else if (m <= 5119)  r = 96 + (m - 4096) / 64;
    else if (m <= 6143)  r = 112 + (m - 5120) / 256;
    else if (m <= 7167)  r = 116 + (m - 6144) / 256;
    else if (m <= 8191)  r = 120 + (m - 7168) / 256;
    else if (m <= 12287) r = 124 + (m - 8192) / 1024;
    else                 r = 127;
    return (s < 0) ? -r : r;
  endfunction

  int sat_events = 0;

  task automatic reference(input int xin [4], output int yout [3]);
    int cur [16], nxt [16];
    int wi, s;
    wi = 0;
    for (int k = 0; k < 4; k++) cur[k] = xin[k];
    for (int l = 1; l < NL; l++) begin
      for (int j = 0; j < LAY[l]; j++) begin
        s = 0;
        for (int k = 0; k < LAY[l-1]; k++) begin
          s = s + cur[k] * wgt(wi);
          wi++;
          if (s > 32767) begin s = 32767; sat_events++; end
          if (s < -32768) begin s = -32768; sat_events++; end
        end
        nxt[j] = af(s);
      end
      for (int j = 0; j < LAY[l]; j++) cur[j] = nxt[j];
    end
    for (int j = 0; j < 3; j++) yout[j] = cur[j];
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xin [4], yexp [3], cyc;
    for (int k = 0; k < 4; k++) x[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int run = 0; run < 40; run++) begin
      for (int k = 0; k < 4; k++) begin
        xin[k] = (run == 0) ? 127 : (run == 1) ? -128 : int'($urandom_range(0, 255)) - 128;
        x[k] <= data_t'(xin[k]);
      end
      reference(xin, yexp);
      start <= 1;
      @(posedge clk);
      #1;
      start <= 0;
      cyc = 0;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc !== EXPECTED_CYCLES) begin
        failures++;
        $display("run %0d: decision took %0d cycles, expected %0d", run, cyc, EXPECTED_CYCLES);
      end
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (int'(y[j]) !== yexp[j]) begin
          failures++;
          $display("run %0d out %0d: got %0d expected %0d", run, j, y[j], yexp[j]);
        end
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    checks++;
    if (sat_events == 0) begin
      failures++;
      $display("accumulator saturation never exercised");
    end
    $display("saturation events in reference: %0d", sat_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
