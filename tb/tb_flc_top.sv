// tb_flc_top: end-to-end test of the active-rule fuzzy logic controller.
//
// The reference model here evaluates every rule of the bank (not only the
// fired ones): SOP[k] = max over all rules with consequent k of the minimum of
// the input degrees, then y = sum c_k*SOP[k] / sum SOP[k]. Equal results show
// that visiting only the fired sets loses nothing. Membership degrees, rules
// and output centres are recomputed from their defining formulas. Checks the
// inference time (23 cycles from start to done), back-to-back inferences at one
// per 23 cycles, and counts inputs that fire one set (exactly at a set centre)
// and two sets, requiring both cases to occur.
module tb_flc_top;

  localparam int P1 = 7, P2 = 5, R = 7;
  localparam int LEN = 23;

  logic       clk = 0, rst_n = 0, start = 0, busy, done;
  logic [7:0] x [2];
  logic [7:0] y [1];
  int checks = 0, failures = 0, single_fire = 0, double_fire = 0;

  flc_top dut (.clk, .rst_n, .start_i(start), .x_i(x), .busy_o(busy), .done_o(done), .y_o(y));

  always #5 clk = ~clk;

  function automatic int mu(input int p, input int j, input int xv);
    int d;
    d = xv * (p - 1) - j * 255;
    if (d < 0) d = -d;
    if (d >= 255) return 0;
    return 255 - (d * 255) / 255;
  endfunction

  function automatic int rule(input int j1, input int j2);
    // round((j1*(R-1)/(P1-1) + j2*(R-1)/(P2-1)) / 2)
    int num, den;
    num = j1 * (R - 1) * (P2 - 1) + j2 * (R - 1) * (P1 - 1);
    den = (P1 - 1) * (P2 - 1);
    return (2 * num + 2 * den) / (4 * den);
  endfunction

  function automatic int ref_y(input int x1, input int x2);
    int sop [8], m, n, d, k;
    for (k = 0; k < 8; k++) sop[k] = 0;
    for (int j1 = 0; j1 < P1; j1++)
      for (int j2 = 0; j2 < P2; j2++) begin
        m = mu(P1, j1, x1) < mu(P2, j2, x2) ? mu(P1, j1, x1) : mu(P2, j2, x2);
        k = rule(j1, j2);
        if (m > sop[k]) sop[k] = m;
      end
    n = 0; d = 0;
    for (k = 0; k < R; k++) begin
      n += ((k * 255) / (R - 1)) * sop[k];
      d += sop[k];
    end
    return (d == 0) ? 0 : n / d;
  endfunction

  function automatic int fired(input int p, input int xv);
    int c;
    c = 0;
    for (int j = 0; j < p; j++) if (mu(p, j, xv) !== 0) c++;
    return c;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x1, x2, e, cyc;
    int q1 [$], q2 [$];
    x[0] = 0; x[1] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // single inferences with gaps, latency check
    for (int run = 0; run < 300; run++) begin
      case (run)
        0: begin x1 = 0;   x2 = 0;   end
        1: begin x1 = 255; x2 = 255; end
        2: begin x1 = 85;  x2 = 128; end   // 85 is a centre of the 7-set input
        default: begin x1 = $urandom_range(0, 255); x2 = $urandom_range(0, 255); end
      endcase
      if (fired(P1, x1) == 1 || fired(P2, x2) == 1) single_fire++;
      if (fired(P1, x1) == 2 && fired(P2, x2) == 2) double_fire++;
      x[0] <= 8'(x1); x[1] <= 8'(x2);
      start <= 1;
      @(posedge clk);
      #1;
      start <= 0;
      x[0] <= 8'($urandom); x[1] <= 8'($urandom);   // inputs latched at start
      cyc = 0;
      while (!done) begin @(posedge clk); #1; cyc++; end
      e = ref_y(x1, x2);
      checks += 2;
      if (cyc !== LEN) begin
        failures++;
        $display("run %0d: inference took %0d cycles, expected %0d", run, cyc, LEN);
      end
      if (int'(y[0]) !== e) begin
        failures++;
        $display("run %0d: x=(%0d,%0d) y=%0d expected %0d", run, x1, x2, y[0], e);
      end
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    // back-to-back: start held high, new inputs after every latch edge
    start <= 1;
    x1 = $urandom_range(0, 255); x2 = $urandom_range(0, 255);
    x[0] <= 8'(x1); x[1] <= 8'(x2);
    q1.push_back(x1); q2.push_back(x2);
    @(posedge clk); #1;            // first latch
    for (int n = 0; n < 20; n++) begin
      x1 = $urandom_range(0, 255); x2 = $urandom_range(0, 255);
      x[0] = 8'(x1); x[1] = 8'(x2);
      q1.push_back(x1); q2.push_back(x2);
      if (n == 19) start = 0;
      repeat (LEN) @(posedge clk);
      #1;
      checks += 2;
      if (!done) begin failures++; $display("back-to-back %0d: no done", n); end
      e = ref_y(q1.pop_front(), q2.pop_front());
      if (int'(y[0]) !== e) begin failures++; $display("back-to-back %0d: y=%0d expected %0d", n, y[0], e); end
    end
    checks += 2;
    if (single_fire == 0) begin failures++; $display("no input fired a single set"); end
    if (double_fire == 0) begin failures++; $display("no input pair fired two sets each"); end
    $display("single-set cases %0d, two-set cases %0d", single_fire, double_fire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
