// tb_flc_workloads: the controller sized for the other two applications the
// architecture was used for, each checked against a full-rule-evaluation
// reference with the built-in tables:
//   * inverted pendulum: inputs with 7 and 7 sets, 7 output sets (49 rules);
//   * autofocus: three inputs with 3 sets each and three output variables
//     with 3 sets each (27 rules per output; the built-in rules of the
//     middle output are mirrored).
// Both take PMAX + 2*2^N_IN + R + 1 = 23 cycles per inference.
module tb_flc_workloads;
  logic clk = 0, rst_n = 0;
  logic sp = 0, sa = 0, bp, ba, dp, da;
  logic [7:0] xp [2], xa [3], yp [1], ya [3];
  int checks = 0, failures = 0;

  flc_top #(.N_IN(2), .P_MF('{7, 7, 0, 0}), .R_MF(7)) u_pend (
    .clk, .rst_n, .start_i(sp), .x_i(xp), .busy_o(bp), .done_o(dp), .y_o(yp));
  flc_top #(.N_IN(3), .P_MF('{3, 3, 3, 0}), .R_MF(3), .N_OUT(3)) u_af (
    .clk, .rst_n, .start_i(sa), .x_i(xa), .busy_o(ba), .done_o(da), .y_o(ya));

  always #5 clk = ~clk;

  function automatic int mu(input int p, input int j, input int xv);
    int d;
    d = xv * (p - 1) - j * 255;
    if (d < 0) d = -d;
    return (d >= 255) ? 0 : 255 - d;
  endfunction

  // reference for n inputs with p sets each, r output sets
  function automatic int ref_y(input int n, input int p, input int r, input int xv [3], input bit mirror);
    int sop [8], nrules, rem, m, k, num, den, jj [3], nn, dd;
    for (k = 0; k < 8; k++) sop[k] = 0;
    nrules = 1;
    for (int i = 0; i < n; i++) nrules *= p;
    for (int a = 0; a < nrules; a++) begin
      rem = a;
      for (int i = n - 1; i >= 0; i--) begin jj[i] = rem % p; rem /= p; end
      m = 255; num = 0;
      for (int i = 0; i < n; i++) begin
        if (mu(p, jj[i], xv[i]) < m) m = mu(p, jj[i], xv[i]);
        num += jj[i] * (r - 1);
      end
      den = (p - 1) * n;             // out = round(num/den)
      k = (2 * num + den) / (2 * den);
      if (mirror) k = r - 1 - k;
      if (m > sop[k]) sop[k] = m;
    end
    nn = 0; dd = 0;
    for (k = 0; k < r; k++) begin nn += ((k * 255) / (r - 1)) * sop[k]; dd += sop[k]; end
    return (dd == 0) ? 0 : nn / dd;
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [3], cyc, e;
    xp = '{0, 0}; xa = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int run = 0; run < 200; run++) begin
      for (int i = 0; i < 3; i++) v[i] = $urandom_range(0, 255);
      xp[0] <= 8'(v[0]); xp[1] <= 8'(v[1]);
      xa[0] <= 8'(v[0]); xa[1] <= 8'(v[1]); xa[2] <= 8'(v[2]);
      sp <= 1; sa <= 1;
      @(posedge clk); #1;
      sp <= 0; sa <= 0;
      cyc = 0;
      while (!dp) begin @(posedge clk); #1; cyc++; end
      checks += 3;
      if (cyc !== 23) failures++;
      if (!da) failures++;
      e = ref_y(2, 7, 7, v, 1'b0);
      if (int'(yp[0]) !== e) begin failures++; $display("pendulum x=(%0d,%0d): %0d expected %0d", v[0], v[1], yp[0], e); end
      for (int k = 0; k < 3; k++) begin
        e = ref_y(3, 3, 3, v, k == 1);
        checks++;
        if (int'(ya[k]) !== e) begin failures++; $display("autofocus out %0d x=(%0d,%0d,%0d): %0d expected %0d", k, v[0], v[1], v[2], ya[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
