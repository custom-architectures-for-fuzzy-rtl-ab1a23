// tb_ann_control: checks the microprogram of the default 4-4-5-3 network by
// following symbolic node identifiers through a model of the data row.
// Inputs are nodes 0..3, the hidden neurons 4..7 and 8..12, the outputs
// 13..15. Every multiply cycle, the node leaving the row must be input k of
// neuron j of the current layer, in weight-ROM order; a row load from the
// activation function must store the node whose last product was issued
// 18 cycles earlier (datapath latency); output writes must carry the output
// neurons in order. Also checks first/last tags, 51 products, and that done
// comes 112 cycles after start.
// A second instance runs the asynchronous Hopfield program (3 nodes, 2
// sweeps, 5-cell row). Each node update gets a new identifier; every product
// must see the newest identifier of the node it reads, so a state loaded into
// the wrong cell or too late is caught. The last sweep must write its three
// results to the output register in node order, and done must come after
// 3 + 2*3*(3+18) + 1 = 130 cycles.
module tb_ann_control;
  import ann_pkg::*;
  localparam int L = 8;
  localparam int DLY = 18;
  localparam int LAY [4] = '{4, 4, 5, 3};
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  row_op_e op [L];
  logic src_in, mac, first, last, out_we, wrst;
  logic [2:0] in_idx, out_idx;
  int row [L], nxt [L];
  int checks = 0, failures = 0;
  int macs = 0, outs = 0, cyc;
  int last_node_at [int];   // time -> node whose last product was issued then

  localparam int AL = 5;
  logic astart = 0, abusy, adone, asrc_in, amac, afirst, alast, aout_we, awrst;
  row_op_e aop [AL];
  logic [2:0] ain_idx, aout_idx;
  int arow [AL], anxt [AL];
  int a_last_at [int];

  ann_control #(.L(AL), .N_LAYERS(3), .LAYERS('{3, 3, 3, 0, 0, 0, 0, 0}), .ASYNC(1'b1)) dut_async (
    .clk, .rst_n, .start_i(astart), .busy_o(abusy), .done_o(adone), .op_o(aop),
    .src_in_o(asrc_in), .in_idx_o(ain_idx), .mac_o(amac), .first_o(afirst), .last_o(alast),
    .out_we_o(aout_we), .out_idx_o(aout_idx), .w_restart_o(awrst)
  );

  ann_control #(.L(L)) dut (
    .clk, .rst_n, .start_i(start), .busy_o(busy), .done_o(done), .op_o(op),
    .src_in_o(src_in), .in_idx_o(in_idx), .mac_o(mac), .first_o(first), .last_o(last),
    .out_we_o(out_we), .out_idx_o(out_idx), .w_restart_o(wrst)
  );
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0d: %s", cyc, what); end
  endtask

  // expected (layer, neuron, input) of product number n
  function automatic void decode(input int n, output int l, output int j, output int k, output int nbase, output int pbase);
    int rem, nb, pb;
    rem = n; nb = 4; pb = 0;
    for (int ll = 1; ll < 4; ll++) begin
      if (rem < LAY[ll-1] * LAY[ll]) begin
        l = ll; j = rem / LAY[ll-1]; k = rem % LAY[ll-1];
        nbase = nb; pbase = pb;
        return;
      end
      rem -= LAY[ll-1] * LAY[ll];
      pb = nb;
      nb += LAY[ll];
    end
    l = -1; j = -1; k = -1; nbase = -1; pbase = -1;
  endfunction

  initial begin : watchdog
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l, j, k, nb, pb, ready_node;
    for (int c = 0; c < L; c++) row[c] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    start = 1;
    check(wrst === 1'b1, "weight restart with start");
    @(posedge clk); #1;
    start = 0;
    cyc = 0;
    while (!done && cyc < 400) begin
      // the word now in the microinstruction register executes in this cycle
      if (mac) begin
        decode(macs, l, j, k, nb, pb);
        check(row[L-1] === ((l === 1) ? k : pb + k),
              $sformatf("product %0d: row output node %0d, expected %0d", macs, row[L-1], (l == 1) ? k : pb + k));
        check(first === (k === 0), "first tag");
        check(last === (k === LAY[l-1] - 1), "last tag");
        if (last) last_node_at[cyc] = nb + j;
        macs++;
      end
      ready_node = last_node_at.exists(cyc - DLY) ? last_node_at[cyc - DLY] : -2;
      // latest finished node at or before this cycle
      for (int s = cyc - DLY; s >= 0; s--)
        if (last_node_at.exists(s)) begin ready_node = last_node_at[s]; break; end
      if (out_we) begin
        check(last_node_at.exists(cyc - DLY), "output write not aligned with a result");
        check(ready_node === 13 + int'(out_idx), $sformatf("output %0d carries node %0d", out_idx, ready_node));
        outs++;
      end
      for (int c = 0; c < L; c++) begin
        case (op[c])
          OP_NOP:   nxt[c] = row[c];
          OP_ROT:   nxt[c] = row[L-1];
          OP_SHIFT: nxt[c] = (c == 0) ? -1 : row[c-1];
          default:  nxt[c] = src_in ? int'(in_idx) : ready_node;
        endcase
        if (op[c] == OP_LOAD && !src_in)
          check(ready_node >= 0, "activation load before any result");
      end
      row = nxt;
      @(posedge clk); #1;
      cyc++;
    end
    check(macs === 51, $sformatf("%0d products, expected 51", macs));
    check(outs === 3, $sformatf("%0d output writes, expected 3", outs));
    check(cyc === 112, $sformatf("done after %0d cycles, expected 112", cyc));
    check(busy === 1'b0 || done, "busy after done");

    // asynchronous Hopfield program
    begin
      int tok [3], prods, sw, nd, kk, rdy, aouts;
      for (int c = 0; c < AL; c++) arow[c] = -1;
      for (int k = 0; k < 3; k++) tok[k] = k;
      prods = 0; aouts = 0;
      astart = 1;
      @(posedge clk); #1;
      astart = 0;
      cyc = 0;
      while (!adone && cyc < 400) begin
        sw = prods / 9; nd = (prods / 3) % 3; kk = prods % 3;
        rdy = -2;
        for (int t = cyc - DLY; t >= 0; t--)
          if (a_last_at.exists(t)) begin rdy = a_last_at[t]; break; end
        if (amac) begin
          check(arow[AL-1] === tok[kk],
                $sformatf("async product %0d: row output %0d, expected %0d", prods, arow[AL-1], tok[kk]));
          check(afirst === (kk === 0) && alast === (kk === 2), "async first/last tags");
          if (alast) a_last_at[cyc] = 3 + 3 * sw + nd;
          prods++;
        end
        if (aout_we) begin
          check(a_last_at.exists(cyc - DLY) && rdy === 6 + int'(aout_idx),
                $sformatf("async output %0d carries %0d", aout_idx, rdy));
          aouts++;
        end
        for (int c = 0; c < AL; c++) begin
          case (aop[c])
            OP_NOP:   anxt[c] = arow[c];
            OP_ROT:   anxt[c] = arow[AL-1];
            OP_SHIFT: anxt[c] = (c == 0) ? -1 : arow[c-1];
            default:  anxt[c] = asrc_in ? int'(ain_idx) : rdy;
          endcase
          if (aop[c] === OP_LOAD && !asrc_in) begin
            check(a_last_at.exists(cyc - DLY) && rdy >= 3, "async load not aligned with a result");
            // the new state of node n replaces its identifier
            tok[(rdy - 3) % 3] = rdy;
          end
        end
        arow = anxt;
        @(posedge clk); #1;
        cyc++;
      end
      check(prods === 18, $sformatf("async: %0d products, expected 18", prods));
      check(aouts === 3, $sformatf("async: %0d output writes, expected 3", aouts));
      check(cyc === 130, $sformatf("async: done after %0d cycles, expected 130", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
