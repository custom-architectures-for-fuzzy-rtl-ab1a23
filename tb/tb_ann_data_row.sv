// tb_ann_data_row: random operation sequences on an 8-cell row, compared with
// a model of the four cell operations (hold, take row output, take left
// neighbour with zero into cell 0, load).
module tb_ann_data_row;
  import ann_pkg::*;
  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  row_op_e op [L];
  data_t ld, rout, cells [L];
  int m [L], nxt [L];
  int checks = 0, failures = 0;

  ann_data_row #(.L(L)) dut (.clk, .rst_n, .op_i(op), .load_i(ld), .row_o(rout), .cells_o(cells));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < L; c++) begin op[c] = OP_NOP; m[c] = 0; end
    ld = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int t = 0; t < 2000; t++) begin
      for (int c = 0; c < L; c++) op[c] = row_op_e'($urandom_range(0, 3));
      ld = data_t'($urandom);
      for (int c = 0; c < L; c++)
        case (op[c])
          OP_NOP:   nxt[c] = m[c];
          OP_ROT:   nxt[c] = m[L-1];
          OP_SHIFT: nxt[c] = (c == 0) ? 0 : m[c-1];
          default:  nxt[c] = int'(ld);
        endcase
      @(posedge clk); #1;
      for (int c = 0; c < L; c++) begin
        m[c] = nxt[c];
        checks++;
        if (int'(cells[c]) !== m[c]) begin
          failures++;
          $display("t=%0d cell %0d: %0d expected %0d", t, c, cells[c], m[c]);
        end
      end
      checks++;
      if (int'(rout) !== m[L-1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
