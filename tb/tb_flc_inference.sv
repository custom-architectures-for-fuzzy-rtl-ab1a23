// tb_flc_inference: random sequences of max-min updates at random ADF
// addresses interleaved with IND reads, against an SOP model.
module tb_flc_inference;
  logic clk = 0, rst_n = 0, clr, adf_ind, we;
  logic [7:0] regv [2], sop;
  logic [2:0] adf, ind, addr;
  int m [8];
  int checks = 0, failures = 0;

  flc_inference #(.N_IN(2), .MUW(8), .SOP_N(8), .OW(3)) dut (
    .clk, .rst_n, .clr_i(clr), .regv_i(regv), .adf_i(adf), .ind_i(ind),
    .adf_ind_i(adf_ind), .sop_we_i(we), .sop_o(sop), .sop_addr_o(addr));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mn, a;
    clr = 0; adf_ind = 0; we = 0; regv = '{0, 0}; adf = 0; ind = 0;
    for (int k = 0; k < 8; k++) m[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int t = 0; t < 3000; t++) begin
      regv[0] = 8'($urandom); regv[1] = 8'($urandom);
      adf = 3'($urandom); ind = 3'($urandom);
      adf_ind = $urandom; we = $urandom; clr = ($urandom_range(0, 50) == 0);
      a = adf_ind ? int'(ind) : int'(adf);
      #1;
      checks += 2;
      if (int'(addr) !== a) failures++;
      if (int'(sop) !== m[a]) begin failures++; $display("t=%0d sop[%0d]=%0d expected %0d", t, a, sop, m[a]); end
      mn = (regv[0] < regv[1]) ? int'(regv[0]) : int'(regv[1]);
      @(posedge clk); #1;
      if (clr) for (int k = 0; k < 8; k++) m[k] = 0;
      else if (we && mn > m[a]) m[a] = mn;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
