// tb_ann_output: random writes into the three output registers, compared with
// a model; entries not written must hold.
module tb_ann_output;
  import ann_pkg::*;
  logic clk = 0, rst_n = 0, we;
  logic [1:0] idx;
  data_t d, y [3];
  int m [3] = '{0, 0, 0};
  int checks = 0, failures = 0;

  ann_output #(.N_OUT(3)) dut (.clk, .rst_n, .we_i(we), .idx_i(idx), .d_i(d), .y_o(y));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; idx = 0; d = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int t = 0; t < 1000; t++) begin
      we = $urandom;
      idx = 2'($urandom_range(0, 2));
      d = data_t'($urandom);
      if (we) m[idx] = int'(d);
      @(posedge clk); #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (int'(y[i]) !== m[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
