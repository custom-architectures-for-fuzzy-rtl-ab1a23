// flc_mf_mem: membership-function memory and MF-identifier memory of one input.
//
// The controller stores its input membership functions as tables (the memory
// approach): for crisp input x_i and MF number j_i the MF table returns the
// membership degree mu_o of x in fuzzy set j, and the MF-IDF table returns the
// identifier idf_o of that set. The identifier is stored pre-scaled by the
// input's rule-bank stride (the product of the MF counts of the inputs after
// it), so the address maker only has to add the identifiers of all inputs to
// form a rule address. Both tables are read combinationally; for j_i >= P the
// degree is 0.
// Table contents: P triangular sets spread evenly over 0..2^XW-1, each
// reaching full degree 2^MUW-1 at its centre and falling to 0 at the centres of
// its neighbours, so at most two degrees are non-zero for any x:
//   mu_j(x) = MUMAX - |x*(P-1) - j*XMAX| * MUMAX / XMAX   (0 when negative).
// The table organisation and the scaled identifiers follow the architecture;
// the triangle shapes are built-ins (an application loads its own tables).
module flc_mf_mem
  import flc_pkg::*;
#(
  parameter int unsigned XW     = 8,   // crisp input width
  parameter int unsigned MUW    = 8,   // membership degree width
  parameter int unsigned P      = 7,   // number of MFs of this input
  parameter int unsigned JW     = 3,   // width of the MF number
  parameter int unsigned STRIDE = 5,   // rule-bank stride of this input
  parameter int unsigned IW     = 6    // identifier width
) (
  input  logic [XW-1:0]  x_i,
  input  logic [JW-1:0]  j_i,
  output logic [MUW-1:0] mu_o,
  output logic [IW-1:0]  idf_o
);

  localparam int XMAX  = 2**XW - 1;
  localparam int MUMAX = 2**MUW - 1;

  logic [MUW-1:0] mf_rom  [P * 2**XW];  // MF(x): address {j, x}
  logic [IW-1:0]  idf_rom [P];          // MF-IDF(x)

  initial begin
    int d;
    for (int j = 0; j < int'(P); j++) begin
      idf_rom[j] = IW'(j * int'(STRIDE));
      for (int x = 0; x <= XMAX; x++) begin
        d = x * (int'(P) - 1) - j * XMAX;
        if (d < 0) d = -d;
        if (P == 1)        mf_rom[j * (XMAX + 1) + x] = MUW'(MUMAX);
        else if (d >= XMAX) mf_rom[j * (XMAX + 1) + x] = '0;
        else               mf_rom[j * (XMAX + 1) + x] = MUW'(MUMAX - (d * MUMAX) / XMAX);
      end
    end
  end

  always_comb begin
    if (int'(j_i) < int'(P)) begin
      mu_o  = mf_rom[int'(j_i) * (XMAX + 1) + int'(x_i)];
      idf_o = idf_rom[int'(j_i)];
    end else begin
      mu_o  = '0;
      idf_o = '0;
    end
  end

endmodule
