// tb_flc_control: records the control words of one inference for 7/5 input
// sets and 7 output sets and checks the schedule: 7 fuzzification words with
// j = 0..6 and AB_ptr = 1, then for each of the 4 combinations of the two
// SelV bits an ADF load followed by an SOP write, 7 defuzzification words
// with IND = 0..6, and a final load-and-clear word; done must follow 23
// cycles after start, and a held start must restart without a gap.
module tb_flc_control;
  logic clk = 0, rst_n = 0, start, ldx, busy, done, clr, fz, abp, ldadf, we, adfind, acc, outld;
  logic [2:0] j, ind;
  logic selv [2];
  int checks = 0, failures = 0;

  flc_control #(.N_IN(2), .PMAX(7), .R_MF(7), .NREG(2), .JW(3), .OW(3)) dut (
    .clk, .rst_n, .start_i(start), .ld_x_o(ldx), .busy_o(busy), .done_o(done),
    .clr_o(clr), .fz_en_o(fz), .ab_ptr_o(abp), .j_o(j), .selv_o(selv),
    .ld_adf_o(ldadf), .sop_we_o(we), .adf_ind_o(adfind), .ind_o(ind),
    .acc_en_o(acc), .out_ld_o(outld));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_inference(input bit hold_start);
    int c;
    for (int t = 0; t < 23; t++) begin
      if (t < 7) begin
        check(fz && abp && int'(j) === t && !ldadf && !we && !acc && !outld && !clr, $sformatf("fuzzify word %0d", t));
      end else if (t < 15) begin
        c = (t - 7) / 2;
        check(!fz && !abp && selv[0] === c[0] && selv[1] === c[1], $sformatf("selv word %0d", t));
        check(ldadf === ((t - 7) % 2 === 0) && we === ((t - 7) % 2 === 1) && !adfind, $sformatf("inference word %0d", t));
      end else if (t < 22) begin
        check(adfind && acc && int'(ind) === t - 15 && !we && !outld, $sformatf("defuzz word %0d", t));
      end else begin
        check(outld && clr && !acc, "final word");
        check(ldx === hold_start, "restart latch on last word");
      end
      if (t > 0) check(!done, "early done");
      @(posedge clk); #1;
    end
    check(done, "done after 23 cycles");
  endtask

  initial begin
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!busy && !fz && !ldx, "idle");
    start = 1;
    #1;
    check(ldx, "input latch on start");
    @(posedge clk); #1;
    one_inference(1'b1);           // start still high: next one follows at once
    start = 0;
    one_inference(1'b0);
    check(!busy, "idle after last inference");
    @(posedge clk); #1;
    check(!done && !fz, "stays idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
