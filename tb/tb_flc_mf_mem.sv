// tb_flc_mf_mem: every input value and MF number of a 7-set input against the
// triangular membership formula; identifiers must be j*STRIDE, numbers beyond
// the last set must read 0, and no input may fire more than two sets.
module tb_flc_mf_mem;
  logic [7:0] x;
  logic [2:0] j;
  logic [7:0] mu;
  logic [5:0] idf;
  int checks = 0, failures = 0;

  flc_mf_mem #(.XW(8), .MUW(8), .P(7), .JW(3), .STRIDE(5), .IW(6)) dut (.x_i(x), .j_i(j), .mu_o(mu), .idf_o(idf));

  function automatic int tri_mu(input int jj, input int xv);
    int d;
    d = xv * 6 - jj * 255;
    if (d < 0) d = -d;
    return (d >= 255) ? 0 : 255 - d;
  endfunction

  initial begin
    int nz;
    for (int xv = 0; xv < 256; xv++) begin
      nz = 0;
      for (int jj = 0; jj < 8; jj++) begin
        x = 8'(xv); j = 3'(jj);
        #1;
        checks++;
        if (jj < 7) begin
          if (int'(mu) !== tri_mu(jj, xv)) begin
            failures++;
            if (failures < 10) $display("x=%0d j=%0d mu=%0d expected %0d", xv, jj, mu, tri_mu(jj, xv));
          end
          checks++;
          if (int'(idf) !== 5 * jj) failures++;
          if (mu !== 0) nz++;
        end else if (mu !== 0) failures++;
      end
      checks++;
      if (nz < 1 || nz > 2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
