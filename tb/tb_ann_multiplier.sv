// tb_ann_multiplier: a new random operand pair every cycle; each product and
// its tag must appear exactly 16 cycles later (the pipeline latency).
module tb_ann_multiplier;
  import ann_pkg::*;
  logic clk = 0, rst_n = 0;
  data_t a, b;
  acc_t p;
  logic [2:0] tin, tout;
  int exp_p [$], exp_t [$];
  int checks = 0, failures = 0;

  ann_multiplier #(.TAG_W(3)) dut (.clk, .rst_n, .a_i(a), .b_i(b), .tag_i(tin), .p_o(p), .tag_o(tout));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; tin = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int t = 0; t < 3000; t++) begin
      case (t)
        0: begin a = -128; b = -128; end
        1: begin a = -128; b = 127;  end
        2: begin a = 127;  b = 127;  end
        default: begin a = data_t'($urandom); b = data_t'($urandom); end
      endcase
      tin = 3'($urandom);
      exp_p.push_back(int'(a) * int'(b));
      exp_t.push_back(int'(tin));
      @(posedge clk); #1;
      if (t >= 15) begin
        checks += 2;
        if (int'(p) !== exp_p[0]) begin
          failures++;
          $display("t=%0d product %0d expected %0d", t, p, exp_p[0]);
        end
        if (int'(tout) !== exp_t[0]) failures++;
        void'(exp_p.pop_front());
        void'(exp_t.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
