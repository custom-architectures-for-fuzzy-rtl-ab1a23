// tb_flc_defuzz: random inferences of 7 accumulation steps (random SOP
// values, output set = step), then load and clear; the output must be
// sum(c_k*s_k)/sum(s_k) with c_k = 255*k/6, or 0 when all s_k are 0.
module tb_flc_defuzz;
  logic clk = 0, rst_n = 0, clr, acc, ld;
  logic [7:0] sop, y;
  logic [2:0] idx;
  int checks = 0, failures = 0, zero_cases = 0;

  flc_defuzz #(.MUW(8), .R_MF(7), .OW(3), .YW(8), .SOP_N(8)) dut (
    .clk, .rst_n, .clr_i(clr), .acc_en_i(acc), .out_ld_i(ld), .sop_i(sop), .idx_i(idx), .y_o(y));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, d, s, e;
    clr = 0; acc = 0; ld = 0; sop = 0; idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int r = 0; r < 500; r++) begin
      n = 0; d = 0;
      for (int k = 0; k < 7; k++) begin
        s = (r % 50 == 0) ? 0 : (($urandom_range(0, 2) == 0) ? $urandom_range(0, 255) : 0);
        sop = 8'(s); idx = 3'(k); acc = 1;
        n += ((k * 255) / 6) * s;
        d += s;
        @(posedge clk); #1;
      end
      acc = 0; ld = 1; clr = 1;
      @(posedge clk); #1;
      ld = 0; clr = 0;
      e = (d == 0) ? 0 : n / d;
      if (d == 0) zero_cases++;
      checks++;
      if (int'(y) !== e) begin failures++; $display("run %0d: y=%0d expected %0d", r, y, e); end
    end
    checks++;
    if (zero_cases == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
