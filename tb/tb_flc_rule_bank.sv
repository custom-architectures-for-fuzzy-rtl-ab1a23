// tb_flc_rule_bank: every antecedent pair of a 7x5 rule bank; the identifiers
// are given pre-scaled (j1*5, j2) and ADF must become the built-in rule
// round((j1*6/6 + j2*6/4)/2) one cycle after the load, and 0 after clear.
module tb_flc_rule_bank;
  logic clk = 0, rst_n = 0, clr, ld;
  logic [5:0] idf [2];
  logic [2:0] adf;
  int checks = 0, failures = 0;

  flc_rule_bank #(.N_IN(2), .P_MF('{7, 5, 0, 0}), .R_MF(7), .IW(6), .OW(3)) dut (
    .clk, .rst_n, .clr_i(clr), .ld_i(ld), .idf_i(idf), .adf_o(adf));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    clr = 0; ld = 0; idf[0] = 0; idf[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int j1 = 0; j1 < 7; j1++)
      for (int j2 = 0; j2 < 5; j2++) begin
        idf[0] = 6'(j1 * 5); idf[1] = 6'(j2); ld = 1;
        @(posedge clk); #1;
        ld = 0;
        // (j1 + 1.5*j2)/2 rounded half up, = (2*j1 + 3*j2 + 2) / 4
        e = (2 * j1 + 3 * j2 + 2) / 4;
        checks++;
        if (int'(adf) !== e) begin failures++; $display("j=(%0d,%0d) adf=%0d expected %0d", j1, j2, adf, e); end
        idf[0] = 6'($urandom_range(0, 30)); idf[1] = 6'($urandom_range(0, 4));
        @(posedge clk); #1;
        checks++;
        if (int'(adf) !== e) failures++;   // holds without ld
      end
    clr = 1;
    @(posedge clk); #1;
    checks++;
    if (adf !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
