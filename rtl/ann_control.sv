// ann_control: microprogrammed control unit of the neural network.
//
// The control unit steps linearly through a microprogram (no jumps), one word
// per cycle, after a start pulse, and copies each word into the
// microinstruction register that drives the datapath. A word holds a 2-bit
// operation for each of the L cells of the data/results row (2*L bits) plus
// the datapath controls: the source of a row load (input datum x[in_idx] or the
// activation result), the multiply-accumulate tags (mac, first, last) and the
// write of an output neuron into the output register.
//
// The microprogram is computed at elaboration from the layer sizes LAYERS of a
// layered feedforward net, following this schedule:
//   * input load: input k is loaded into cell L-1-k.
//   * each layer with a inputs and b neurons: the inputs sit in the a rightmost
//     cells and rotate (OP_ROT on cell L-a, OP_SHIFT right of it), so the row
//     output presents inputs 0..a-1 in turn while the weight ROM presents the
//     matching weights: a*b multiply cycles, one product per cycle.
//   * the result of neuron j is ready DLY cycles after its last product (the
//     datapath latency) and is loaded into cell L-a-1-j, left of the ring; the
//     last neuron's result waits until the ring is free, then the row shifts
//     right by a and the last result is loaded into cell L-b, leaving the b
//     results in the order the next layer needs.
//   * output-layer results are written into the output register instead.
// With ASYNC = 1 the program instead updates a Hopfield net of n = LAYERS[0]
// nodes asynchronously, one node at a time, for N_LAYERS-1 sweeps (all
// LAYERS entries equal n). The n states sit in the n rightmost cells, node k
// in cell L-1-k. For node j the ring rotates once (n products with weight row
// j), the control waits for the result, and loads it into cell L-1-j at once,
// so the next node already sees the new state. One node takes n + DLY cycles.
// The last sweep also writes each new state into the output register. The
// synchronous Hopfield net is the layered schedule with every layer n wide.
// A layer pair with a inputs and b neurons needs a+b-1 cells, which is the
// architecture's rule L = max(N-1) over two contiguous levels; an elaboration
// check rejects a row that is too short. done_o pulses one cycle after the
// last word has executed. The cell operations, the 2*L-bit microinstruction
// register and the linear microprogram follow the architecture; the exact
// schedule, the start/done handshake and the field layout are this design's.
module ann_control
  import ann_pkg::*;
#(
  parameter int unsigned L        = 8,
  parameter int unsigned N_LAYERS = 4,
  parameter int unsigned LAYERS [MAX_LAYERS] = '{4, 4, 5, 3, 0, 0, 0, 0},  // first N_LAYERS used
  parameter int unsigned DLY      = 18,   // last product -> activation result
  parameter int unsigned IW       = 3,    // width of input / output indices
  parameter bit          ASYNC    = 1'b0  // 1: sequential Hopfield updating
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  output logic          busy_o,
  output logic          done_o,
  output row_op_e       op_o [L],     // microinstruction register: cell ops
  output logic          src_in_o,     // row load from input data (else AF)
  output logic [IW-1:0] in_idx_o,
  output logic          mac_o,        // row output and weight form a product
  output logic          first_o,      // first product of a neuron
  output logic          last_o,       // last product of a neuron
  output logic          out_we_o,     // write AF result to the output register
  output logic [IW-1:0] out_idx_o,
  output logic          w_restart_o   // weight pointer to 0 (start of a run)
);

  typedef struct packed {
    row_op_e [L-1:0] ops;
    logic            src_in;
    logic [IW-1:0]   in_idx;
    logic            mac;
    logic            first;
    logic            last;
    logic            out_we;
    logic [IW-1:0]   out_idx;
  } uword_t;

  function automatic int imax(input int x, input int y);
    return (x > y) ? x : y;
  endfunction

  // Number of microprogram words for the schedule described above.
  function automatic int up_len();
    int base, a, b, tl, s0;
    base = LAYERS[0];
    if (ASYNC) return base + (N_LAYERS - 1) * base * (base + DLY);
    for (int l = 1; l < N_LAYERS; l++) begin
      a  = LAYERS[l-1];
      b  = LAYERS[l];
      tl = base + a * b - 1 + DLY;
      if (l == N_LAYERS - 1) begin
        base = tl + 1;
      end else begin
        s0   = imax(base + a * b, tl - a + 1);
        base = imax(s0 + a, tl) + 1;
      end
    end
    return base;
  endfunction

  // Cells the largest pair of contiguous levels needs.
  function automatic int cells_needed();
    int n;
    n = LAYERS[0];
    if (ASYNC) return n;
    for (int l = 1; l < N_LAYERS; l++) n = imax(n, LAYERS[l-1] + LAYERS[l] - 1);
    return n;
  endfunction

  // The asynchronous program needs every level as wide as the first.
  function automatic bit levels_equal();
    for (int l = 1; l < N_LAYERS; l++) if (LAYERS[l] != LAYERS[0]) return 1'b0;
    return 1'b1;
  endfunction

  localparam int UP_LEN = up_len();
  localparam int PCW    = (UP_LEN > 1) ? $clog2(UP_LEN) : 1;

  // Microprogram word at time t of the schedule described above.
  function automatic uword_t gen_word(input int t);
    uword_t w;
    int base, a, b, tr, tl, s0, ld;
    w = '0;
    // initial data load
    for (int k = 0; k < int'(LAYERS[0]); k++) begin
      if (t == k) begin
        w.ops[L-1-k] = OP_LOAD;
        w.src_in     = 1'b1;
        w.in_idx     = IW'(k);
      end
    end
    base = LAYERS[0];
    if (ASYNC) begin
      a = LAYERS[0];
      for (int l = 1; l < N_LAYERS; l++) begin
        for (int j = 0; j < a; j++) begin
          // node j: one ring rotation, then its new state into cell L-1-j
          if (t >= base && t < base + a) begin
            w.ops[L-a] = OP_ROT;
            for (int c = L - a + 1; c < L; c++) w.ops[c] = OP_SHIFT;
            w.mac   = 1'b1;
            w.first = (t == base);
            w.last  = (t == base + a - 1);
          end
          tr = base + a - 1 + DLY;
          if (t == tr) begin
            w.ops[L-1-j] = OP_LOAD;
            if (l == N_LAYERS - 1) begin
              w.out_we  = 1'b1;
              w.out_idx = IW'(j);
            end
          end
          base = tr + 1;
        end
      end
      return w;
    end
    for (int l = 1; l < N_LAYERS; l++) begin
      a = LAYERS[l-1];
      b = LAYERS[l];
      // multiply phase: rotate the a-cell ring once per neuron
      if (t >= base && t < base + a * b) begin
        w.ops[L-a] = OP_ROT;
        for (int c = L - a + 1; c < L; c++) w.ops[c] = OP_SHIFT;
        w.mac   = 1'b1;
        w.first = ((t - base) % a == 0);
        w.last  = ((t - base) % a == a - 1);
      end
      tl = base + a * b - 1 + DLY;
      if (l == N_LAYERS - 1) begin
        for (int j = 0; j < b; j++) begin
          tr = base + a * j + a - 1 + DLY;
          if (t == tr) begin
            w.out_we  = 1'b1;
            w.out_idx = IW'(j);
          end
        end
        base = tl + 1;
      end else begin
        for (int j = 0; j < b - 1; j++) begin
          tr = base + a * j + a - 1 + DLY;
          if (t == tr) w.ops[L-a-1-j] = OP_LOAD;
        end
        s0 = imax(base + a * b, tl - a + 1);
        if (t >= s0 && t < s0 + a)
          for (int c = 0; c < L; c++) w.ops[c] = OP_SHIFT;
        ld = imax(s0 + a, tl);
        if (t == ld) w.ops[L-b] = OP_LOAD;
        base = ld + 1;
      end
    end
    return w;
  endfunction

  // microprogram ROM
  uword_t uprog [UP_LEN];
  for (genvar t = 0; t < UP_LEN; t++) begin : g_uprog
    localparam uword_t WORD = gen_word(t);
    assign uprog[t] = WORD;
  end

  if (cells_needed() > int'(L)) begin : g_row_too_short
    $error("ann_control: data/results row of %0d cells is too short, %0d needed",
           L, cells_needed());
  end

  if (ASYNC && !levels_equal()) begin : g_async_levels
    $error("ann_control: asynchronous Hopfield program needs equal LAYERS entries");
  end

  logic [PCW-1:0] upc_q;
  logic           run_q;
  logic           issued_last_q;
  uword_t         uir_q;           // microinstruction register

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      upc_q         <= '0;
      run_q         <= 1'b0;
      issued_last_q <= 1'b0;
      uir_q         <= '0;
      done_o        <= 1'b0;
    end else begin
      issued_last_q <= run_q && (upc_q == PCW'(UP_LEN - 1));
      done_o        <= issued_last_q;
      if (run_q) begin
        uir_q <= uprog[upc_q];
        if (upc_q == PCW'(UP_LEN - 1)) begin
          run_q <= 1'b0;
          upc_q <= '0;
        end else begin
          upc_q <= upc_q + 1'b1;
        end
      end else begin
        uir_q <= '0;
        if (start_i) run_q <= 1'b1;
      end
    end
  end

  assign busy_o      = run_q || (uir_q != '0) || issued_last_q;
  assign w_restart_o = start_i && !run_q;
  for (genvar c = 0; c < L; c++) begin : g_ops
    assign op_o[c] = uir_q.ops[c];
  end
  assign src_in_o  = uir_q.src_in;
  assign in_idx_o  = uir_q.in_idx;
  assign mac_o     = uir_q.mac;
  assign first_o   = uir_q.first;
  assign last_o    = uir_q.last;
  assign out_we_o  = uir_q.out_we;
  assign out_idx_o = uir_q.out_idx;

endmodule
