// ann_multiplier: pipelined 8x8 signed array multiplier with a 16-bit product.
//
// The multiplier is an array of DW x DW one-bit multipliers (AND gates): row k
// forms the partial product a * b[k] * 2^k, and the rows are added one after
// the other. Each row takes two pipeline stages, one to form the partial
// product and one to add it into the running sum, so a new pair of operands is
// accepted every cycle and its product leaves 2*DW = 16 cycles later, the
// latency the architecture gives. The most significant row is subtracted, which
// makes the product two's-complement signed. A tag travels alongside the
// operands with the same latency, so control information (valid, first, last)
// arrives together with its product. The staging into two steps per row is
// this design's choice; the 8-bit operands, 16-bit product, one result per
// cycle and 16-cycle latency follow the architecture.
module ann_multiplier
  import ann_pkg::*;
#(
  parameter int unsigned TAG_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  data_t            a_i,     // data operand
  input  data_t            b_i,     // weight operand
  input  logic [TAG_W-1:0] tag_i,
  output acc_t             p_o,     // a_i * b_i, 16 cycles later
  output logic [TAG_W-1:0] tag_o
);

  localparam int unsigned NS = 2 * DW;  // pipeline stages

  data_t            a_q   [NS];
  data_t            b_q   [NS];
  logic [PW-1:0]    s_q   [NS];   // running sum
  logic [PW-1:0]    pp_q  [NS];   // partial product (used after even stages)
  logic [TAG_W-1:0] t_q   [NS];

  for (genvar st = 0; st < NS; st++) begin : g_stage
    localparam int unsigned K = st / 2;   // multiplier bit handled
    data_t            a_in, b_in;
    logic [PW-1:0]    s_in, pp_in;
    logic [TAG_W-1:0] t_in;

    if (st == 0) begin : g_first
      assign a_in  = a_i;
      assign b_in  = b_i;
      assign s_in  = '0;
      assign pp_in = '0;
      assign t_in  = tag_i;
    end else begin : g_next
      assign a_in  = a_q[st-1];
      assign b_in  = b_q[st-1];
      assign s_in  = s_q[st-1];
      assign pp_in = pp_q[st-1];
      assign t_in  = t_q[st-1];
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        a_q[st]  <= '0;
        b_q[st]  <= '0;
        s_q[st]  <= '0;
        pp_q[st] <= '0;
        t_q[st]  <= '0;
      end else begin
        a_q[st] <= a_in;
        b_q[st] <= b_in;
        t_q[st] <= t_in;
        if (st % 2 == 0) begin
          // one row of DW one-bit multipliers on the sign-extended operand
          pp_q[st] <= (PW'(signed'(a_in)) & {PW{b_in[K]}}) << K;
          s_q[st]  <= s_in;
        end else begin
          pp_q[st] <= '0;
          s_q[st]  <= (K == DW - 1) ? s_in - pp_in : s_in + pp_in;
        end
      end
    end
  end

  assign p_o   = acc_t'(s_q[NS-1]);
  assign tag_o = t_q[NS-1];

endmodule
