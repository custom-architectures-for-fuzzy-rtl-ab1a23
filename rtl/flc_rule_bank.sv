// flc_rule_bank: address maker, rule bank and ADF register.
//
// The address maker adds the pre-scaled identifiers of the selected fired set
// of every input, which gives the linear index of the rule whose antecedents
// are exactly those sets (row-major over the inputs' MF numbers). The rule
// bank is a table holding, for every antecedent combination, the number of the
// consequent output set. On ld_i the consequent is latched into ADF, the
// pointer to the output fuzzy set used by the following MAX/SOP update; clr_i
// zeroes ADF. Table contents come from RULE_FILE ($readmemh, one output-set
// number per rule, the tables of all N_OUT output variables one after the
// other; this bank takes table OUT_K) when it is set; otherwise a built-in
// diagonal rule table is used, mirrored for odd output variables:
//   out(j_0..j_{n-1}) = round( (sum_i j_i*(R-1)/(P_i-1)) / n ),
//   out' = R-1-out when OUT_K is odd.
// The adder-based address maker, the table and the ADF register follow the
// architecture; the built-in rules and the file option are this design's.
module flc_rule_bank
  import flc_pkg::*;
#(
  parameter int unsigned N_IN = 2,
  parameter int unsigned P_MF [MAX_IN] = '{7, 5, 0, 0},  // first N_IN used
  parameter int unsigned R_MF = 7,       // output MFs
  parameter int unsigned IW   = 6,       // identifier / rule address width
  parameter int unsigned OW   = 3,       // ADF width
  parameter int unsigned N_OUT = 1,      // output variables sharing RULE_FILE
  parameter int unsigned OUT_K = 0,      // output variable of this bank
  parameter string       RULE_FILE = ""
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr_i,
  input  logic          ld_i,
  input  logic [IW-1:0] idf_i [N_IN],
  output logic [OW-1:0] adf_o
);

  function automatic int n_rules();
    int n;
    n = 1;
    for (int i = 0; i < int'(N_IN); i++) n = n * int'(P_MF[i]);
    return n;
  endfunction

  localparam int NR = n_rules();

  logic [OW-1:0] rules     [NR];
  logic [OW-1:0] file_rules [N_OUT * NR];
  logic [IW-1:0] addr;

  initial begin
    int rem, jj, num, den, stride;
    for (int a = 0; a < NR; a++) begin
      // num/den = sum_i j_i*(R-1)/(P_i-1), over a common denominator
      rem = a;
      stride = NR;
      num = 0;
      den = 1;
      for (int i = 0; i < int'(N_IN); i++) den = den * ((P_MF[i] > 1) ? int'(P_MF[i]) - 1 : 1);
      for (int i = 0; i < int'(N_IN); i++) begin
        stride = stride / int'(P_MF[i]);
        jj  = rem / stride;
        rem = rem % stride;
        num = num + jj * (int'(R_MF) - 1) * (den / ((P_MF[i] > 1) ? int'(P_MF[i]) - 1 : 1));
      end
      rules[a] = OW'((2 * num + den * int'(N_IN)) / (2 * den * int'(N_IN)));
      if (OUT_K % 2 == 1) rules[a] = OW'(int'(R_MF) - 1) - rules[a];
    end
    if (RULE_FILE != "") begin
      $readmemh(RULE_FILE, file_rules);
      for (int a = 0; a < NR; a++) rules[a] = file_rules[int'(OUT_K) * NR + a];
    end
  end

  // address maker
  always_comb begin
    addr = '0;
    for (int i = 0; i < int'(N_IN); i++) addr = addr + idf_i[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr_i) adf_o <= '0;
    else if (ld_i)       adf_o <= (int'(addr) < NR) ? rules[addr] : '0;
  end

endmodule
