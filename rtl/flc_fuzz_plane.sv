// flc_fuzz_plane: one fuzzifier plane (one input variable).
//
// During fuzzification the control unit scans the MF numbers j of this input,
// one per cycle (fz_en_i high). The Address Computing counter points to the
// next free register; whenever the degree mu_i is non-zero, the degree is
// written into RegV[ptr] and the set identifier into IdfV[ptr], and the
// pointer advances, so only the fired sets are kept (at most NREG of them;
// later ones are dropped). The AB_ptr multiplexer addresses the two banks
// with the computed pointer (ab_ptr_i = 1, fuzzification) or with SelV from
// the control unit (ab_ptr_i = 0, inference); regv_o and idfv_o are the
// entries at that address. clr_i zeroes the banks and the pointer for the next
// inference, so an unused register reads as degree 0 and identifier 0.
// Structure and mux polarity follow the architecture's diagram; NREG = 2 (two
// overlapping sets) and the per-inference clear are this design's choices.
module flc_fuzz_plane
  import flc_pkg::*;
#(
  parameter int unsigned MUW  = 8,
  parameter int unsigned IW   = 6,
  parameter int unsigned NREG = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr_i,
  input  logic                    fz_en_i,
  input  logic [MUW-1:0]          mu_i,
  input  logic [IW-1:0]           idf_i,
  input  logic                    ab_ptr_i,
  input  logic [clog2u(NREG)-1:0] selv_i,
  output logic [MUW-1:0]          regv_o,
  output logic [IW-1:0]           idfv_o
);

  localparam int unsigned SW = clog2u(NREG);

  logic [MUW-1:0] regv_q [NREG];
  logic [IW-1:0]  idfv_q [NREG];
  logic [SW:0]    ptr_q;            // Address Computing
  logic [SW-1:0]  addr;             // AB_ptr multiplexer output
  logic           wr;

  assign addr = ab_ptr_i ? ptr_q[SW-1:0] : selv_i;
  assign wr   = fz_en_i && (mu_i != '0) && (ptr_q < (SW+1)'(NREG));

  always_ff @(posedge clk) begin
    if (!rst_n || clr_i) begin
      ptr_q <= '0;
      for (int r = 0; r < int'(NREG); r++) begin
        regv_q[r] <= '0;
        idfv_q[r] <= '0;
      end
    end else if (wr) begin
      regv_q[addr] <= mu_i;
      idfv_q[addr] <= idf_i;
      ptr_q        <= ptr_q + 1'b1;
    end
  end

  assign regv_o  = regv_q[addr];
  assign idfv_o  = idfv_q[addr];

endmodule
