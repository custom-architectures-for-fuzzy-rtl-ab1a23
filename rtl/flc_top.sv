// flc_top: active-rule fuzzy logic controller (default two inputs, one output).
//
// The controller evaluates only the rules that fire. A fuzzifier plane per
// input scans that input's membership functions and keeps just the non-zero
// degrees (at most two with overlapping triangular sets) together with their
// set identifiers. The inference block then visits each combination of fired
// sets: the address maker adds the identifiers into a rule address, the rule
// bank gives the consequent output set (ADF), and SOP[ADF] takes the maximum
// of its value and the minimum of the combination's degrees. Defuzzification
// forms N = sum c_k*SOP[k] and D = sum SOP[k] over the output sets and divides.
// A linear microprogram sequences everything. With N_OUT > 1 each output
// variable has its own rule bank, SOP bank and defuzzifier; they share the
// fuzzifier planes and the control unit and work in parallel, so extra
// outputs cost no extra cycles.
//
// Interface: pulse (or hold) start_i with the crisp inputs on x_i; they are
// latched at start. done_o pulses when y_o holds the new crisp output. One
// inference takes PMAX + 2*Q + R_MF + 1 cycles, Q = 2^N_IN: 23 cycles for the
// default truck-backer-upper sizes (inputs with 7 and 5 sets, 7 output sets).
// Degrees are MUW bits, inputs XW bits, the output YW bits.
module flc_top
  import flc_pkg::*;
#(
  parameter int unsigned N_IN  = 2,
  parameter int unsigned XW    = 8,
  parameter int unsigned MUW   = 8,
  parameter int unsigned YW    = 8,
  parameter int unsigned P_MF [MAX_IN] = '{7, 5, 0, 0},  // first N_IN used
  parameter int unsigned N_OUT = 1,
  parameter int unsigned R_MF  = 7,
  parameter int unsigned SOP_N = 8,
  parameter string       RULE_FILE = ""
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic [XW-1:0] x_i [N_IN],
  output logic          busy_o,
  output logic          done_o,
  output logic [YW-1:0] y_o [N_OUT]
);

  function automatic int pmax();
    int m;
    m = 1;
    for (int i = 0; i < int'(N_IN); i++) if (int'(P_MF[i]) > m) m = P_MF[i];
    return m;
  endfunction

  function automatic int n_rules();
    int n;
    n = 1;
    for (int i = 0; i < int'(N_IN); i++) n = n * int'(P_MF[i]);
    return n;
  endfunction

  // rule-bank stride of input i: product of the MF counts of the inputs after it
  function automatic int stride(input int i);
    int s;
    s = 1;
    for (int k = i + 1; k < int'(N_IN); k++) s = s * int'(P_MF[k]);
    return s;
  endfunction

  localparam int unsigned NREG = 2;
  localparam int unsigned SW   = clog2u(NREG);
  localparam int unsigned PMAX = pmax();
  localparam int unsigned JW   = clog2u(PMAX);
  localparam int unsigned IW   = clog2u(n_rules());
  localparam int unsigned OW   = clog2u(SOP_N);

  logic [XW-1:0]  x_q [N_IN];
  logic           ld_x, clr, fz_en, ab_ptr, ld_adf, sop_we, adf_ind, acc_en, out_ld;
  logic [JW-1:0]  j;
  logic [SW-1:0]  selv [N_IN];
  logic [OW-1:0]  ind;
  logic [MUW-1:0] mu   [N_IN];
  logic [IW-1:0]  idf  [N_IN];
  logic [MUW-1:0] regv [N_IN];
  logic [IW-1:0]  idfv [N_IN];

  flc_control #(
    .N_IN(N_IN), .PMAX(PMAX), .R_MF(R_MF), .NREG(NREG), .JW(JW), .OW(OW)
  ) u_ctrl (
    .clk, .rst_n, .start_i, .ld_x_o(ld_x), .busy_o, .done_o,
    .clr_o(clr), .fz_en_o(fz_en), .ab_ptr_o(ab_ptr), .j_o(j), .selv_o(selv),
    .ld_adf_o(ld_adf), .sop_we_o(sop_we), .adf_ind_o(adf_ind), .ind_o(ind),
    .acc_en_o(acc_en), .out_ld_o(out_ld)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_IN); i++) x_q[i] <= '0;
    end else if (ld_x) begin
      x_q <= x_i;
    end
  end

  for (genvar i = 0; i < N_IN; i++) begin : g_plane
    flc_mf_mem #(
      .XW(XW), .MUW(MUW), .P(P_MF[i]), .JW(JW), .STRIDE(stride(i)), .IW(IW)
    ) u_mf (
      .x_i(x_q[i]), .j_i(j), .mu_o(mu[i]), .idf_o(idf[i])
    );

    flc_fuzz_plane #(.MUW(MUW), .IW(IW), .NREG(NREG)) u_plane (
      .clk, .rst_n, .clr_i(clr), .fz_en_i(fz_en), .mu_i(mu[i]), .idf_i(idf[i]),
      .ab_ptr_i(ab_ptr), .selv_i(selv[i]), .regv_o(regv[i]), .idfv_o(idfv[i])
    );
  end

  // one inference and defuzzifier block per output variable
  for (genvar k = 0; k < N_OUT; k++) begin : g_out
    logic [OW-1:0]  adf, sop_addr;
    logic [MUW-1:0] sop;

    flc_rule_bank #(
      .N_IN(N_IN), .P_MF(P_MF), .R_MF(R_MF), .IW(IW), .OW(OW),
      .N_OUT(N_OUT), .OUT_K(k), .RULE_FILE(RULE_FILE)
    ) u_rules (
      .clk, .rst_n, .clr_i(clr), .ld_i(ld_adf), .idf_i(idfv), .adf_o(adf)
    );

    flc_inference #(.N_IN(N_IN), .MUW(MUW), .SOP_N(SOP_N), .OW(OW)) u_inf (
      .clk, .rst_n, .clr_i(clr), .regv_i(regv), .adf_i(adf), .ind_i(ind),
      .adf_ind_i(adf_ind), .sop_we_i(sop_we), .sop_o(sop), .sop_addr_o(sop_addr)
    );

    flc_defuzz #(.MUW(MUW), .R_MF(R_MF), .OW(OW), .YW(YW), .SOP_N(SOP_N)) u_defz (
      .clk, .rst_n, .clr_i(clr), .acc_en_i(acc_en), .out_ld_i(out_ld),
      .sop_i(sop), .idx_i(sop_addr), .y_o(y_o[k])
    );
  end

endmodule
