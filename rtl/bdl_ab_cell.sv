// bdl_ab_cell: the a.b macro transition of the array multiplier.
//
// It takes one token from each present input place (p, a, b, c) and, in the
// same firing, creates one token in each present output place:
//   p' = sum   of p + c + a*b
//   c' = carry of p + c + a*b
//   a' = a,  b' = b  (copies passed on to the neighbouring cells)
// It fires in one clock when every present input is full and every present
// output is empty. The HAS_* parameters remove inputs or outputs for the
// cells on the edges of the array: no p and no c on the first level, no c on
// the least significant cell, no b' on the most significant cell, no a' on
// the last level. A missing input counts as 0, so on the first level
// p' = a*b and c' = 0. The function and the edge cases are the document's;
// the inner net of the cell is not given there, and writing it as one firing
// rule is this design's choice.
module bdl_ab_cell
  import bdl_pkg::*;
#(
  parameter bit HAS_P    = 1'b1,
  parameter bit HAS_C    = 1'b1,
  parameter bit HAS_COUT = 1'b1,
  parameter bit HAS_BOUT = 1'b1,
  parameter bit HAS_AOUT = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  token_t p_i,
  output logic   p_take,
  input  token_t a_i,
  output logic   a_take,
  input  token_t b_i,
  output logic   b_take,
  input  token_t c_i,
  output logic   c_take,
  output token_t p_o,
  input  logic   p_otake,
  output token_t a_o,
  input  logic   a_otake,
  output token_t b_o,
  input  logic   b_otake,
  output token_t c_o,
  input  logic   c_otake
);

  logic in_ok, out_ok, fire;
  logic pv, cv, ab, sum, carry;

  always_comb begin
    in_ok  = a_i.full && b_i.full && (!HAS_P || p_i.full) && (!HAS_C || c_i.full);
    out_ok = !p_o.full && (!HAS_AOUT || !a_o.full) && (!HAS_BOUT || !b_o.full)
             && (!HAS_COUT || !c_o.full);
    fire   = in_ok && out_ok;
    pv     = HAS_P && p_i.val;
    cv     = HAS_C && c_i.val;
    ab     = a_i.val && b_i.val;
    sum    = pv ^ cv ^ ab;
    carry  = (pv && cv) || (pv && ab) || (cv && ab);
  end

  assign a_take = fire;
  assign b_take = fire;
  assign p_take = HAS_P && fire;
  assign c_take = HAS_C && fire;

  bdl_place u_p (.clk, .rst_n, .put(fire), .put_val(sum), .take(p_otake), .tok(p_o));

  if (HAS_AOUT) begin : g_a
    bdl_place u_a (.clk, .rst_n, .put(fire), .put_val(a_i.val), .take(a_otake), .tok(a_o));
  end else begin : g_no_a
    assign a_o = '0;
  end

  if (HAS_BOUT) begin : g_b
    bdl_place u_b (.clk, .rst_n, .put(fire), .put_val(b_i.val), .take(b_otake), .tok(b_o));
  end else begin : g_no_b
    assign b_o = '0;
  end

  if (HAS_COUT) begin : g_c
    bdl_place u_c (.clk, .rst_n, .put(fire), .put_val(carry), .take(c_otake), .tok(c_o));
  end else begin : g_no_c
    assign c_o = '0;
  end

endmodule
