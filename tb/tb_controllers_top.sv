// tb_controllers_top: end-to-end test of both controllers at default sizes.
//
// The fuzzy controller and the neural network run at the same time, each fed
// random inputs, and every result is compared with a reference model written
// here (full rule evaluation for the fuzzy controller, a layer-by-layer
// integer model for the network). Checked: every output, the fuzzy inference
// time (23 cycles), the network decision time (112 cycles), and that each
// mechanism happened at least once: an input firing a single set and two
// sets, back-to-back fuzzy inferences, each of the four row-cell operations,
// row loads from the inputs and from the activation function, output-register
// writes, and accumulator saturation.
module tb_controllers_top;
  import ann_pkg::*;

  localparam int P1 = 7, P2 = 5, R = 7, FLC_LEN = 23, ANN_LEN = 112;
  localparam int NL = 4;
  localparam int LAY [NL] = '{4, 4, 5, 3};

  logic       clk = 0, rst_n = 0;
  logic       flc_start = 0, flc_busy, flc_done;
  logic [7:0] flc_x [2];
  logic [7:0] flc_y [1];
  logic       ann_start = 0, ann_busy, ann_done;
  data_t      ann_x [4];
  data_t      ann_y [3];
  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0, n_b2b = 0, n_sat = 0;
  int n_op [4];
  int n_load_in = 0, n_load_af = 0, n_out_we = 0;

  controllers_top dut (
    .clk, .rst_n,
    .flc_start_i(flc_start), .flc_x_i(flc_x), .flc_busy_o(flc_busy),
    .flc_done_o(flc_done), .flc_y_o(flc_y),
    .ann_start_i(ann_start), .ann_x_i(ann_x), .ann_busy_o(ann_busy),
    .ann_done_o(ann_done), .ann_y_o(ann_y)
  );

  always #5 clk = ~clk;

  // ---------------- fuzzy reference ----------------
  function automatic int mu(input int p, input int j, input int xv);
    int d;
    d = xv * (p - 1) - j * 255;
    if (d < 0) d = -d;
    return (d >= 255) ? 0 : 255 - d;
  endfunction

  function automatic int rule(input int j1, input int j2);
    int num, den;
    num = j1 * (R - 1) * (P2 - 1) + j2 * (R - 1) * (P1 - 1);
    den = (P1 - 1) * (P2 - 1);
    return (2 * num + 2 * den) / (4 * den);
  endfunction

  function automatic int flc_ref(input int x1, input int x2);
    int sop [8], m, n, d, k;
    for (k = 0; k < 8; k++) sop[k] = 0;
    for (int j1 = 0; j1 < P1; j1++)
      for (int j2 = 0; j2 < P2; j2++) begin
        m = (mu(P1, j1, x1) < mu(P2, j2, x2)) ? mu(P1, j1, x1) : mu(P2, j2, x2);
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

  // ---------------- network reference ----------------
  function automatic int wgt(input int i);
    return ((29 * i + 7) % 256) - 128;
  endfunction

  function automatic int af(input int s);
    int m, r;
    m = (s < 0) ? -s : s;
    if (m > 32767) m = 32767;
    if (m <= 2047)       r = m / 32;
    else if (m <= 4095)  r = 64 + (m - 2048) / 64;
    else if (m <= 5119)  r = 96 + (m - 4096) / 64;
    else if (m <= 8191)  r = 112 + (m - 5120) / 256;
    else if (m <= 12287) r = 124 + (m - 8192) / 1024;
    else                 r = 127;
    return (s < 0) ? -r : r;
  endfunction

  task automatic ann_ref(input int xin [4], output int yout [3]);
    int cur [16], nxt [16];
    int wi, s;
    wi = 0;
    for (int k = 0; k < 4; k++) cur[k] = xin[k];
    for (int l = 1; l < NL; l++) begin
      for (int j = 0; j < LAY[l]; j++) begin
        s = 0;
        for (int k = 0; k < LAY[l-1]; k++) begin
          s = s + cur[k] * wgt(wi);
          wi++;
          if (s > 32767)  begin s = 32767;  n_sat++; end
          if (s < -32768) begin s = -32768; n_sat++; end
        end
        nxt[j] = af(s);
      end
      for (int j = 0; j < LAY[l]; j++) cur[j] = nxt[j];
    end
    for (int j = 0; j < 3; j++) yout[j] = cur[j];
  endtask

  // ---------------- mechanism counters (network control) ----------------
  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < 8; c++) n_op[int'(dut.u_ann.u_ctrl.op_o[c])]++;
      if (dut.u_ann.u_ctrl.out_we_o) n_out_we++;
      for (int c = 0; c < 8; c++)
        if (dut.u_ann.u_ctrl.op_o[c] == OP_LOAD) begin
          if (dut.u_ann.u_ctrl.src_in_o) n_load_in++;
          else                           n_load_af++;
        end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- fuzzy stimulus ----------------
  task automatic run_flc();
    int x1, x2, e, cyc;
    int q1 [$], q2 [$];
    for (int run = 0; run < 200; run++) begin
      x1 = (run == 0) ? 85 : $urandom_range(0, 255);   // 85: centre of a 7-set MF
      x2 = (run == 0) ? 128 : $urandom_range(0, 255);
      if (fired(P1, x1) == 1 || fired(P2, x2) == 1) n_single++;
      if (fired(P1, x1) == 2 && fired(P2, x2) == 2) n_double++;
      flc_x[0] <= 8'(x1); flc_x[1] <= 8'(x2);
      flc_start <= 1;
      @(posedge clk); #1;
      flc_start <= 0;
      cyc = 0;
      while (!flc_done) begin @(posedge clk); #1; cyc++; end
      e = flc_ref(x1, x2);
      check(cyc == FLC_LEN, $sformatf("flc run %0d took %0d cycles", run, cyc));
      check(int'(flc_y[0]) == e, $sformatf("flc run %0d x=(%0d,%0d) y=%0d exp %0d", run, x1, x2, flc_y[0], e));
    end
    // back-to-back inferences with start held high
    flc_start = 1;
    x1 = $urandom_range(0, 255); x2 = $urandom_range(0, 255);
    flc_x[0] = 8'(x1); flc_x[1] = 8'(x2);
    q1.push_back(x1); q2.push_back(x2);
    @(posedge clk); #1;
    for (int n = 0; n < 10; n++) begin
      x1 = $urandom_range(0, 255); x2 = $urandom_range(0, 255);
      flc_x[0] = 8'(x1); flc_x[1] = 8'(x2);
      q1.push_back(x1); q2.push_back(x2);
      if (n == 9) flc_start = 0;
      repeat (FLC_LEN) @(posedge clk);
      #1;
      check(flc_done == 1'b1, $sformatf("flc back-to-back %0d: no done", n));
      e = flc_ref(q1.pop_front(), q2.pop_front());
      check(int'(flc_y[0]) == e, $sformatf("flc back-to-back %0d: y=%0d exp %0d", n, flc_y[0], e));
      if (flc_done && int'(flc_y[0]) == e) n_b2b++;
    end
  endtask

  // ---------------- network stimulus ----------------
  task automatic run_ann();
    int xin [4], yexp [3], cyc;
    for (int run = 0; run < 30; run++) begin
      for (int k = 0; k < 4; k++) begin
        xin[k] = (run == 0) ? 127 : int'($urandom_range(0, 255)) - 128;
        ann_x[k] <= data_t'(xin[k]);
      end
      ann_ref(xin, yexp);
      ann_start <= 1;
      @(posedge clk); #1;
      ann_start <= 0;
      cyc = 0;
      while (!ann_done) begin @(posedge clk); #1; cyc++; end
      check(cyc == ANN_LEN, $sformatf("ann run %0d took %0d cycles", run, cyc));
      for (int j = 0; j < 3; j++)
        check(int'(ann_y[j]) == yexp[j],
              $sformatf("ann run %0d out %0d: got %0d exp %0d", run, j, ann_y[j], yexp[j]));
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) n_op[i] = 0;
    flc_x[0] = 0; flc_x[1] = 0;
    for (int k = 0; k < 4; k++) ann_x[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      run_flc();
      run_ann();
    join
    $display("flc: single-set %0d, two-set %0d, back-to-back %0d", n_single, n_double, n_b2b);
    $display("ann: nop %0d rot %0d shift %0d load %0d (input %0d, activation %0d), out writes %0d, saturations %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_load_in, n_load_af, n_out_we, n_sat);
    check(n_single > 0, "no single-set fuzzification");
    check(n_double > 0, "no two-set fuzzification");
    check(n_b2b > 0, "no back-to-back inference");
    check(n_op[int'(OP_NOP)] > 0, "row op NOP never used");
    check(n_op[int'(OP_ROT)] > 0, "row op ROT never used");
    check(n_op[int'(OP_SHIFT)] > 0, "row op SHIFT never used");
    check(n_op[int'(OP_LOAD)] > 0, "row op LOAD never used");
    check(n_load_in > 0, "no row load from inputs");
    check(n_load_af > 0, "no row load from activation");
    check(n_out_we > 0, "no output register write");
    check(n_sat > 0, "accumulator never saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
