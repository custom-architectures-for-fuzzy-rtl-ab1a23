// tb_ann_accumulator: random valid/clear/last sequences with large products,
// compared with a saturating 16-bit accumulation model.
module tb_ann_accumulator;
  import ann_pkg::*;
  logic clk = 0, rst_n = 0, v, clr, last, last_o;
  acc_t p, acc;
  int m = 0, sat = 0, checks = 0, failures = 0;

  ann_accumulator dut (.clk, .rst_n, .valid_i(v), .clr_i(clr), .last_i(last), .p_i(p), .acc_o(acc), .last_o(last_o));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    v = 0; clr = 0; last = 0; p = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int t = 0; t < 3000; t++) begin
      v = ($urandom_range(0, 3) !== 0);
      clr = ($urandom_range(0, 5) == 0);
      last = $urandom;
      p = acc_t'($urandom_range(0, 32767) - 16384 + ($urandom_range(0,1) ? 0 : 0));
      if (v) begin
        s = (clr ? 0 : m) + int'(p);
        if (s > 32767) begin s = 32767; sat++; end
        if (s < -32768) begin s = -32768; sat++; end
        m = s;
      end
      @(posedge clk); #1;
      checks += 2;
      if (int'(acc) !== m) begin failures++; $display("t=%0d acc %0d expected %0d", t, acc, m); end
      if (last_o !== (v && last)) failures++;
    end
    checks++;
    if (sat == 0) failures++;
    $display("saturations %0d", sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
