// tb_flc_fuzz_plane: scans of random degree sequences (mostly zeros, zero to
// three non-zero) through a plane; after each scan the stored degrees and
// identifiers are read back through SelV and compared with the first two
// non-zero entries of the scan, unused registers must read 0, then the bank
// is cleared.
module tb_flc_fuzz_plane;
  logic clk = 0, rst_n = 0, clr, fz, abp;
  logic [7:0] mu, regv;
  logic [5:0] idf, idfv;
  logic selv;
  int checks = 0, failures = 0, overflow_scans = 0;

  flc_fuzz_plane #(.MUW(8), .IW(6), .NREG(2)) dut (
    .clk, .rst_n, .clr_i(clr), .fz_en_i(fz), .mu_i(mu), .idf_i(idf),
    .ab_ptr_i(abp), .selv_i(selv), .regv_o(regv), .idfv_o(idfv));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int em [2], ei [2], n;
    clr = 0; fz = 0; abp = 0; mu = 0; idf = 0; selv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int s = 0; s < 300; s++) begin
      em = '{0, 0}; ei = '{0, 0}; n = 0;
      for (int jj = 0; jj < 7; jj++) begin
        fz = 1; abp = 1;
        mu = ($urandom_range(0, 3) == 0) ? 8'($urandom_range(1, 255)) : 8'd0;
        idf = 6'($urandom);
        if (mu !== 0) begin
          if (n < 2) begin em[n] = int'(mu); ei[n] = int'(idf); end
          n++;
        end
        @(posedge clk); #1;
      end
      if (n > 2) overflow_scans++;
      fz = 0; abp = 0;
      for (int r = 0; r < 2; r++) begin
        selv = r[0];
        #1;
        checks += 2;
        if (int'(regv) !== em[r]) begin failures++; $display("scan %0d reg %0d: %0d expected %0d", s, r, regv, em[r]); end
        if (int'(idfv) !== ei[r]) failures++;
      end
      clr = 1;
      @(posedge clk); #1;
      clr = 0;
      checks++;
      if (regv !== 0) failures++;
    end
    checks++;
    if (overflow_scans == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
