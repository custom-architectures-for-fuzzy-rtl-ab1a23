// flc_inference: MIN, MAX and the SOP register bank of one output variable.
//
// For each combination of fired input sets the MIN block takes the smallest
// of the selected input degrees (the rule's firing strength), and the MAX
// block combines it with the current SOP[ADF]; on sop_we_i the result is
// written back, so SOP[k] ends up as the largest firing strength of all rules
// whose consequent is output set k. The ADF_IND multiplexer addresses the SOP
// bank with ADF during inference (adf_ind_i = 0) and with IND from the control
// unit during defuzzification (adf_ind_i = 1); sop_o and sop_addr_o give the
// entry read and its address. clr_i zeroes the bank for the next inference.
// Structure and mux polarity follow the architecture's diagram (eight SOP
// registers); the per-inference clear is this design's choice.
module flc_inference
  import flc_pkg::*;
#(
  parameter int unsigned N_IN  = 2,
  parameter int unsigned MUW   = 8,
  parameter int unsigned SOP_N = 8,
  parameter int unsigned OW    = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr_i,
  input  logic [MUW-1:0] regv_i [N_IN],  // selected degree of every input
  input  logic [OW-1:0]  adf_i,
  input  logic [OW-1:0]  ind_i,
  input  logic           adf_ind_i,
  input  logic           sop_we_i,
  output logic [MUW-1:0] sop_o,
  output logic [OW-1:0]  sop_addr_o
);

  logic [MUW-1:0] sop_q [SOP_N];
  logic [MUW-1:0] min_v, max_v;
  logic [OW-1:0]  addr;

  assign addr = adf_ind_i ? ind_i : adf_i;

  always_comb begin
    min_v = regv_i[0];
    for (int i = 1; i < int'(N_IN); i++)
      if (regv_i[i] < min_v) min_v = regv_i[i];
    max_v = (sop_o > min_v) ? sop_o : min_v;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr_i) begin
      for (int k = 0; k < int'(SOP_N); k++) sop_q[k] <= '0;
    end else if (sop_we_i) begin
      sop_q[addr] <= max_v;
    end
  end

  assign sop_o      = (int'(addr) < int'(SOP_N)) ? sop_q[addr] : '0;
  assign sop_addr_o = addr;

endmodule
