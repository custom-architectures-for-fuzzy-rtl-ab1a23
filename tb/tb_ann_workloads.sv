// tb_ann_workloads: the network sized for the architecture's other examples,
// each against an integer reference model:
//   * the 4-3-2 feedforward net (9 nodes, 18 weights) in a 6-cell row;
//   * a synchronous 3-node Hopfield net, run as four successive updates of
//     all three nodes (layers 3-3-3-3-3) in a 5-cell row, reusing the same 9
//     weights (self weights zero) through the circular weight buffer;
//   * the same Hopfield net updated asynchronously (one node at a time, each
//     node using the states already updated in the sweep), four sweeps;
//   * a 10-input net with one hidden level of two neurons and one output
//     (10-2-1, 22 weights) in an 11-cell row, at this design's 8-bit width.
module tb_ann_workloads;
  import ann_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s1 = 0, s2 = 0, b1, b2, d1, d2, b3, d3, b4, d4;
  data_t x1 [4], y1 [2], x2 [3], y2 [3], y3 [3], x4 [10], y4 [1];
  int checks = 0, failures = 0;

  ann_top #(.L(6), .N_LAYERS(3), .LAYERS('{4, 3, 2, 0, 0, 0, 0, 0}), .S_WM(18)) u_ff (
    .clk, .rst_n, .start_i(s1), .x_i(x1), .busy_o(b1), .done_o(d1), .y_o(y1));
  ann_top #(.L(5), .N_LAYERS(5), .LAYERS('{3, 3, 3, 3, 3, 0, 0, 0}), .S_WM(9),
            .WEIGHT_FILE("tb/hopfield3_weights.hex")) u_hop (
    .clk, .rst_n, .start_i(s2), .x_i(x2), .busy_o(b2), .done_o(d2), .y_o(y2));
  ann_top #(.L(5), .N_LAYERS(5), .LAYERS('{3, 3, 3, 3, 3, 0, 0, 0}), .S_WM(9),
            .WEIGHT_FILE("tb/hopfield3_weights.hex"), .ASYNC(1'b1)) u_hopa (
    .clk, .rst_n, .start_i(s2), .x_i(x2), .busy_o(b3), .done_o(d3), .y_o(y3));
  ann_top #(.L(11), .N_LAYERS(3), .LAYERS('{10, 2, 1, 0, 0, 0, 0, 0}), .S_WM(22)) u_wide (
    .clk, .rst_n, .start_i(s1), .x_i(x4), .busy_o(b4), .done_o(d4), .y_o(y4));

  always #5 clk = ~clk;

  // weights of the Hopfield net, same values as the hex file
  localparam int HW [9] = '{0, 40, -70, 40, 0, 90, -70, 90, 0};

  function automatic int wgt(input int i);
    return ((29 * i + 7) % 256) - 128;
  endfunction

  function automatic int af(input int s);
    int m, r;
    m = (s < 0) ? -s : s;
    if (m > 32767) m = 32767;
    if (m <= 2047)       r = m / 32;
    else if (m <= 4095)  r = 64 + (m - 2048) / 64;
    else if (m <= 5119)  r = 96 + (m - 4096) / 64;
    else if (m <= 8191)  r = 112 + (m - 5120) / 256;
    else if (m <= 12287) r = 124 + (m - 8192) / 1024;
    else                 r = 127;
    return (s < 0) ? -r : r;
  endfunction

  function automatic int sat(input int s);
    return (s > 32767) ? 32767 : (s < -32768) ? -32768 : s;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xi [4], h [3], o [3], st [3], nx [3], sa [3], s, wi, cyc, cyc4, xw [10], hw [2], ow;
    x1 = '{0, 0, 0, 0}; x2 = '{0, 0, 0};
    for (int k = 0; k < 10; k++) x4[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int run = 0; run < 30; run++) begin
      for (int k = 0; k < 4; k++) xi[k] = int'($urandom_range(0, 255)) - 128;
      for (int k = 0; k < 4; k++) x1[k] <= data_t'(xi[k]);
      for (int k = 0; k < 3; k++) begin st[k] = xi[k]; sa[k] = xi[k]; x2[k] <= data_t'(xi[k]); end
      // 4-3-2 reference
      wi = 0;
      for (int j = 0; j < 3; j++) begin
        s = 0;
        for (int k = 0; k < 4; k++) begin s = sat(s + xi[k] * wgt(wi)); wi++; end
        h[j] = af(s);
      end
      for (int j = 0; j < 2; j++) begin
        s = 0;
        for (int k = 0; k < 3; k++) begin s = sat(s + h[k] * wgt(wi)); wi++; end
        o[j] = af(s);
      end
      // 10-2-1 reference
      for (int k = 0; k < 10; k++) begin
        xw[k] = int'($urandom_range(0, 255)) - 128;
        x4[k] <= data_t'(xw[k]);
      end
      wi = 0;
      for (int j = 0; j < 2; j++) begin
        s = 0;
        for (int k = 0; k < 10; k++) begin s = sat(s + xw[k] * wgt(wi)); wi++; end
        hw[j] = af(s);
      end
      s = 0;
      for (int k = 0; k < 2; k++) begin s = sat(s + hw[k] * wgt(wi)); wi++; end
      ow = af(s);
      // Hopfield reference: four synchronous updates
      for (int it = 0; it < 4; it++) begin
        for (int j = 0; j < 3; j++) begin
          s = 0;
          for (int k = 0; k < 3; k++) s = sat(s + st[k] * HW[3 * j + k]);
          nx[j] = af(s);
        end
        st = nx;
      end
      // Hopfield reference: four asynchronous sweeps, updated in place
      for (int it = 0; it < 4; it++) begin
        for (int j = 0; j < 3; j++) begin
          s = 0;
          for (int k = 0; k < 3; k++) s = sat(s + sa[k] * HW[3 * j + k]);
          sa[j] = af(s);
        end
      end
      s1 <= 1; s2 <= 1;
      @(posedge clk); #1;
      s1 <= 0; s2 <= 0;
      fork
        begin while (!d1) begin @(posedge clk); #1; end end
        begin while (!d2) begin @(posedge clk); #1; end end
        begin
          // 69 words (10 loads, 20 + 18 + 1 cycles, 2 + 18 cycles) plus 2
          cyc4 = 1;
          while (!d4) begin @(posedge clk); #1; cyc4++; end
          checks++;
          if (cyc4 !== 71) begin failures++; $display("10-2-1 took %0d cycles", cyc4); end
        end
        begin
          // 3 loads + 4 sweeps x 3 nodes x (3 + 18) cycles, plus 2
          cyc = 1;
          while (!d3) begin @(posedge clk); #1; cyc++; end
          checks++;
          if (cyc !== 3 + 12 * 21 + 2) begin failures++; $display("async Hopfield took %0d cycles", cyc); end
        end
      join
      @(posedge clk); #1;
      for (int j = 0; j < 2; j++) begin
        checks++;
        if (int'(y1[j]) !== o[j]) begin failures++; $display("4-3-2 run %0d out %0d: %0d expected %0d", run, j, y1[j], o[j]); end
      end
      checks++;
      if (int'(y4[0]) !== ow) begin failures++; $display("10-2-1 run %0d: %0d expected %0d", run, y4[0], ow); end
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (int'(y2[j]) !== st[j]) begin failures++; $display("Hopfield run %0d node %0d: %0d expected %0d", run, j, y2[j], st[j]); end
        checks++;
        if (int'(y3[j]) !== sa[j]) begin failures++; $display("async Hopfield run %0d node %0d: %0d expected %0d", run, j, y3[j], sa[j]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
