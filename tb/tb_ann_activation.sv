// tb_ann_activation: every 16-bit input against the input/output ranges of
// the activation table (each input range must map linearly onto its output
// range), mirrored for negative inputs; also checks monotonicity and that
// the output holds while en_i is low.
module tb_ann_activation;
  import ann_pkg::*;
  logic clk = 0, rst_n = 0, en;
  acc_t x;
  data_t y;
  int checks = 0, failures = 0;

  ann_activation dut (.clk, .rst_n, .en_i(en), .x_i(x), .y_o(y));
  always #5 clk = ~clk;

  // table: input range lo..hi maps onto output olo..ohi
  function automatic int table_f(input int m);
    int lo [9] = '{0, 1024, 2048, 4096, 5120, 6144, 7168, 8192, 12288};
    int hi [9] = '{1023, 2047, 4095, 5119, 6143, 7167, 8191, 12287, 32767};
    int olo [9] = '{0, 32, 64, 96, 112, 116, 120, 124, 127};
    int ohi [9] = '{31, 63, 95, 111, 115, 119, 123, 127, 127};
    for (int r = 0; r < 9; r++)
      if (m >= lo[r] && m <= hi[r])
        return olo[r] + ((m - lo[r]) * (ohi[r] - olo[r] + 1)) / (hi[r] - lo[r] + 1);
    return -1;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, prev, mag;
    en = 0; x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    prev = -1000;
    for (int xi = -32768; xi <= 32767; xi++) begin
      x = acc_t'(xi);
      en = 1;
      @(posedge clk); #1;
      mag = (xi < 0) ? ((xi == -32768) ? 32767 : -xi) : xi;
      e = (xi < 0) ? -table_f(mag) : table_f(mag);
      checks++;
      if (int'(y) !== e) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d expected %0d", xi, y, e);
      end
      checks++;
      if (int'(y) < prev) failures++;
      prev = int'(y);
    end
    en = 0; x = 0;
    @(posedge clk); #1;
    checks++;
    if (int'(y) !== 127) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
