// flc_defuzz: output membership weighting, N/D accumulation and division.
//
// During defuzzification the control unit walks IND over the output sets. For
// each set the Output MF block weights the set's SOP value by the set's
// representative output value, VVV = c_k * SOP[k], and on acc_en_i the two
// adders accumulate N += VVV and D += SOP[k]. On out_ld_i the divider forms
// the crisp output N / D (0 when no rule fired) and registers it on y_o. clr_i
// zeroes N and D for the next inference (it may coincide with out_ld_i).
// The representative values are the centres of R_MF evenly spread output sets,
// c_k = k*(2^YW-1)/(R_MF-1), held in a small table (the centroid of symmetric
// sets reduces to this weighted mean). The N and D registers, the adders and
// the divider follow the architecture; the set centres are built-ins and
// the divider, whose insides the architecture leaves open, is a plain
// combinational divider.
module flc_defuzz
  import flc_pkg::*;
#(
  parameter int unsigned MUW   = 8,
  parameter int unsigned R_MF  = 7,
  parameter int unsigned OW    = 3,
  parameter int unsigned YW    = 8,
  parameter int unsigned SOP_N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr_i,
  input  logic           acc_en_i,
  input  logic           out_ld_i,
  input  logic [MUW-1:0] sop_i,
  input  logic [OW-1:0]  idx_i,    // output set of sop_i
  output logic [YW-1:0]  y_o
);

  localparam int unsigned DW = MUW + clog2u(SOP_N) + 1;   // D width
  localparam int unsigned NW = DW + YW;                   // N width
  localparam int          YMAX = 2**YW - 1;

  logic [YW-1:0]  centre [R_MF];   // Output MF table
  logic [NW-1:0]  n_q;
  logic [DW-1:0]  d_q;
  logic [NW-1:0]  vvv;
  logic [YW-1:0]  c_sel;

  initial begin
    for (int k = 0; k < int'(R_MF); k++)
      centre[k] = (R_MF > 1) ? YW'((k * YMAX) / (int'(R_MF) - 1)) : YW'(YMAX / 2);
  end

  assign c_sel = (int'(idx_i) < int'(R_MF)) ? centre[idx_i] : '0;
  assign vvv   = NW'(c_sel) * NW'(sop_i);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_q <= '0;
      d_q <= '0;
      y_o <= '0;
    end else begin
      if (out_ld_i) y_o <= (d_q == '0) ? '0 : YW'(n_q / NW'(d_q));
      if (clr_i) begin
        n_q <= '0;
        d_q <= '0;
      end else if (acc_en_i) begin
        n_q <= n_q + vvv;
        d_q <= d_q + DW'(sop_i);
      end
    end
  end

endmodule
