// tb_ann_weight_rom: reads the 51 weights twice round the circular buffer with
// random pauses, checking contents (built-in formula), wrap-around and
// restart.
module tb_ann_weight_rom;
  import ann_pkg::*;
  localparam int S = 51;
  logic clk = 0, rst_n = 0, restart, adv;
  data_t w;
  int ptr = 0, wraps = 0, checks = 0, failures = 0;

  ann_weight_rom dut (.clk, .rst_n, .restart_i(restart), .adv_i(adv), .w_o(w));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    restart = 0; adv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int t = 0; t < 400; t++) begin
      checks++;
      if (int'(w) !== ((29 * ptr + 7) % 256) - 128) begin
        failures++;
        $display("t=%0d ptr %0d: w=%0d", t, ptr, w);
      end
      adv = $urandom_range(0, 3) !== 0;
      restart = (t == 300);
      @(posedge clk); #1;
      if (restart) ptr = 0;
      else if (adv) begin
        ptr = (ptr == S - 1) ? 0 : ptr + 1;
        if (ptr == 0) wraps++;
      end
    end
    checks++;
    if (wraps < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
