// bdl_ab_row: the A.b module, one level of the array multiplier:
// P' = P + A*b, with A passed on as A' for the next level.
//
// W a.b cells sit side by side. The multiplier bit b enters cell 0 and is
// handed from cell to cell through one place each (b'); the carry ripples
// the same way (c'). Cell i writes p'_i directly. Its copy a' of a_i and the
// final carry of cell W-1 each pass one more identity transition before they
// become a'_i and p'_W, so that A' leaves one cycle after P' (output skew
// P',A' = 1) and both leave with skew 1 across the bits, as the next level
// expects. FIRST removes the P input and the carry ripple (p' = A*b; cell
// W-1 still emits a 0 carry so p'_W exists); LAST removes the A' outputs.
// The net follows the document's A.b decomposition; the clocked firing is
// this design's choice.
module bdl_ab_row
  import bdl_pkg::*;
#(
  parameter int W     = 4,
  parameter bit FIRST = 1'b0,
  parameter bit LAST  = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  token_t         p_i     [W],
  output logic   [W-1:0] p_take,
  input  token_t         a_i     [W],
  output logic   [W-1:0] a_take,
  input  token_t         b_i,
  output logic           b_take,
  output token_t         p_o     [W+1],
  input  logic   [W:0]   p_otake,
  output token_t         a_o     [W],
  input  logic   [W-1:0] a_otake
);

  token_t         bq  [W];   // b' place of cell i (unused for i = W-1)
  token_t         cq  [W];   // c' place of cell i
  token_t         aq  [W];   // a' place of cell i, before the identity transition
  logic   [W-1:0] bq_take, cq_take, aq_take;
  logic   [W-1:0] b_in_take, c_in_take;

  for (genvar i = 0; i < W; i++) begin : g_cell
    localparam bit HC   = !FIRST && (i > 0);
    localparam bit HCO  = FIRST ? (i == W - 1) : 1'b1;
    token_t b_in, c_in;

    if (i == 0) begin : g_b0
      assign b_in   = b_i;
      assign b_take = b_in_take[0];
      assign c_in   = '0;
    end else begin : g_bi
      assign b_in          = bq[i-1];
      assign bq_take[i-1]  = b_in_take[i];
      assign c_in          = cq[i-1];
      assign cq_take[i-1]  = HC ? c_in_take[i] : 1'b0;
    end

    bdl_ab_cell #(
      .HAS_P(!FIRST), .HAS_C(HC), .HAS_COUT(HCO),
      .HAS_BOUT(i < W - 1), .HAS_AOUT(!LAST)
    ) u_cell (
      .clk, .rst_n,
      .p_i(p_i[i]), .p_take(p_take[i]),
      .a_i(a_i[i]), .a_take(a_take[i]),
      .b_i(b_in),   .b_take(b_in_take[i]),
      .c_i(c_in),   .c_take(c_in_take[i]),
      .p_o(p_o[i]), .p_otake(p_otake[i]),
      .a_o(aq[i]),  .a_otake(aq_take[i]),
      .b_o(bq[i]),  .b_otake(i < W - 1 ? bq_take[i] : 1'b0),
      .c_o(cq[i]),  .c_otake(i < W - 1 ? cq_take[i] : cq_take[W-1])
    );

    if (LAST) begin : g_no_a
      assign a_o[i]     = '0;
      assign aq_take[i] = 1'b0;
    end else begin : g_a
      bdl_chain #(.DEPTH(1)) u_a_id (
        .clk, .rst_n, .in_i(aq[i]), .in_take(aq_take[i]), .out_o(a_o[i]), .out_take(a_otake[i])
      );
    end
  end

  assign bq_take[W-1] = 1'b0;

  // final carry -> identity transition -> p'_W
  bdl_chain #(.DEPTH(1)) u_c_id (
    .clk, .rst_n, .in_i(cq[W-1]), .in_take(cq_take[W-1]), .out_o(p_o[W]), .out_take(p_otake[W])
  );

endmodule
