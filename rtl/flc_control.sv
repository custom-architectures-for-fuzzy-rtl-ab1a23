// flc_control: linear microprogram sequencer of the fuzzy logic controller.
//
// A microprogram counter steps through a table of control words, one per
// cycle, without jumps. The table is computed at elaboration from the sizes:
//   1. fuzzification, PMAX words: MF number j = 0..PMAX-1 to every plane,
//      AB_ptr = 1 (planes write fired sets at their computed pointer);
//   2. inference, two words for each of the Q = NREG^N_IN combinations of
//      fired sets: SelV = the combination, AB_ptr = 0; the first word latches
//      the rule's consequent into ADF, the second writes
//      SOP[ADF] = max(SOP[ADF], min(selected degrees));
//   3. defuzzification, R_MF words: ADF_IND = 1, IND = 0..R_MF-1, accumulate
//      N and D;
//   4. one word that loads N/D into the output register and clears all
//      register banks for the next inference.
// The run starts on start_i (ld_x_o then tells the top to latch the crisp
// inputs); if start_i is high during the last word the next inference follows
// without a gap, so the controller delivers one inference every UP_LEN
// = PMAX + 2*Q + R_MF + 1 cycles (23 for 7/5 input sets and 7 output sets).
// done_o pulses in the cycle after the last word, when y is valid.
// The control signals (SelV, AB_ptr, IND, ADF_IND) and the jump-free
// microprogram follow the architecture; the schedule is this design's.
module flc_control
  import flc_pkg::*;
#(
  parameter int unsigned N_IN = 2,
  parameter int unsigned PMAX = 7,   // largest number of MFs of an input
  parameter int unsigned R_MF = 7,
  parameter int unsigned NREG = 2,   // fired sets kept per input
  parameter int unsigned JW   = 3,
  parameter int unsigned OW   = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start_i,
  output logic                    ld_x_o,
  output logic                    busy_o,
  output logic                    done_o,
  output logic                    clr_o,
  output logic                    fz_en_o,
  output logic                    ab_ptr_o,
  output logic [JW-1:0]           j_o,
  output logic [clog2u(NREG)-1:0] selv_o [N_IN],
  output logic                    ld_adf_o,
  output logic                    sop_we_o,
  output logic                    adf_ind_o,
  output logic [OW-1:0]           ind_o,
  output logic                    acc_en_o,
  output logic                    out_ld_o
);

  localparam int unsigned SW = clog2u(NREG);
  localparam int          Q  = NREG ** N_IN;
  localparam int          UP_LEN = PMAX + 2 * Q + R_MF + 1;
  localparam int          PCW = clog2u(UP_LEN);

  typedef struct packed {
    logic                     clr;
    logic                     fz_en;
    logic                     ab_ptr;
    logic [JW-1:0]            j;
    logic [N_IN-1:0][SW-1:0]  selv;
    logic                     ld_adf;
    logic                     sop_we;
    logic                     adf_ind;
    logic [OW-1:0]            ind;
    logic                     acc_en;
    logic                     out_ld;
  } cword_t;

  function automatic cword_t gen_word(input int t);
    cword_t w;
    int c, rem;
    w = '0;
    if (t < int'(PMAX)) begin
      w.fz_en  = 1'b1;
      w.ab_ptr = 1'b1;
      w.j      = JW'(t);
    end else if (t < int'(PMAX) + 2 * Q) begin
      c   = (t - int'(PMAX)) / 2;
      rem = c;
      for (int i = 0; i < int'(N_IN); i++) begin
        w.selv[i] = SW'(rem % int'(NREG));
        rem       = rem / int'(NREG);
      end
      w.ld_adf = ((t - int'(PMAX)) % 2 == 0);
      w.sop_we = ((t - int'(PMAX)) % 2 == 1);
    end else if (t < int'(PMAX) + 2 * Q + int'(R_MF)) begin
      w.adf_ind = 1'b1;
      w.ind     = OW'(t - int'(PMAX) - 2 * Q);
      w.acc_en  = 1'b1;
    end else begin
      w.out_ld = 1'b1;
      w.clr    = 1'b1;
    end
    return w;
  endfunction

  cword_t uprog [UP_LEN];
  for (genvar t = 0; t < UP_LEN; t++) begin : g_uprog
    localparam cword_t WORD = gen_word(t);
    assign uprog[t] = WORD;
  end

  logic [PCW-1:0] upc_q;
  logic           run_q;
  logic           last;
  cword_t         cw;

  assign last   = run_q && (upc_q == PCW'(UP_LEN - 1));
  assign ld_x_o = start_i && (!run_q || last);
  assign cw     = run_q ? uprog[upc_q] : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      upc_q  <= '0;
      run_q  <= 1'b0;
      done_o <= 1'b0;
    end else begin
      done_o <= last;
      if (ld_x_o) begin
        run_q <= 1'b1;
        upc_q <= '0;
      end else if (last) begin
        run_q <= 1'b0;
        upc_q <= '0;
      end else if (run_q) begin
        upc_q <= upc_q + 1'b1;
      end
    end
  end

  assign busy_o    = run_q;
  assign clr_o     = cw.clr;
  assign fz_en_o   = cw.fz_en;
  assign ab_ptr_o  = cw.ab_ptr;
  assign j_o       = cw.j;
  for (genvar i = 0; i < N_IN; i++) begin : g_selv
    assign selv_o[i] = cw.selv[i];
  end
  assign ld_adf_o  = cw.ld_adf;
  assign sop_we_o  = cw.sop_we;
  assign adf_ind_o = cw.adf_ind;
  assign ind_o     = cw.ind;
  assign acc_en_o  = cw.acc_en;
  assign out_ld_o  = cw.out_ld;

endmodule
