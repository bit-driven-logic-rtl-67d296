// bdl_full_adder: the ADD operator, a full adder made of four transitions
// that share the input places a, b, ci and the output places co (carry) and
// z (sum).
//
// The eight input patterns fall into four complementary pairs, one transition
// each: all inputs equal (no inverting arc), or one odd input taken through
// an inverting arc. The unmarked inputs give the transition its color; the
// carry takes that color and the sum takes it (all equal) or its complement
// (one odd input). At most one transition is enabled; it fires in one clock
// and consumes all three inputs. That the operator is four transitions, three
// of them with an inverting input, follows the document; which input is
// inverted in which transition is derived here from the adder's function.
module bdl_full_adder
  import bdl_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  token_t a_i,
  output logic   a_take,
  input  token_t b_i,
  output logic   b_take,
  input  token_t ci_i,
  output logic   ci_take,
  output token_t co_o,
  input  logic   co_take,
  output token_t z_o,
  input  logic   z_take
);

  // transition 0: a b c equal; 1: c odd; 2: b odd; 3: a odd
  localparam arc_t A_ARC[4] = '{ARC_PLAIN, ARC_PLAIN, ARC_PLAIN, ARC_INV};
  localparam arc_t B_ARC[4] = '{ARC_PLAIN, ARC_PLAIN, ARC_INV, ARC_PLAIN};
  localparam arc_t C_ARC[4] = '{ARC_PLAIN, ARC_INV, ARC_PLAIN, ARC_PLAIN};
  localparam arc_t Z_ARC[4] = '{ARC_PLAIN, ARC_INV, ARC_INV, ARC_INV};

  logic [3:0] fire;
  logic [1:0] val [4];

  for (genvar t = 0; t < 4; t++) begin : g_t
    localparam arc_t IA[3] = '{A_ARC[t], B_ARC[t], C_ARC[t]};
    localparam arc_t OA[2] = '{Z_ARC[t], ARC_PLAIN};  // [0] = z, [1] = co
    bdl_transition #(
      .NI(3), .NO(2),
      .IN_ARC(IA),
      .OUT_ARC(OA)
    ) u_t (
      .in_tok  ('{a_i, b_i, ci_i}),
      .out_full({co_o.full, z_o.full}),
      .fire    (fire[t]),
      .out_val (val[t])
    );
  end

  logic fired, co_val, z_val;
  always_comb begin
    fired  = |fire;
    co_val = 1'b0;
    z_val  = 1'b0;
    for (int t = 0; t < 4; t++)
      if (fire[t]) begin
        co_val = val[t][1];
        z_val  = val[t][0];
      end
  end

  assign a_take  = fired;
  assign b_take  = fired;
  assign ci_take = fired;

  bdl_place u_co (.clk, .rst_n, .put(fired), .put_val(co_val), .take(co_take), .tok(co_o));
  bdl_place u_z  (.clk, .rst_n, .put(fired), .put_val(z_val),  .take(z_take),  .tok(z_o));

  // the transitions' input patterns are disjoint: never two firings at once
  always_ff @(posedge clk)
    if (rst_n) assert ((fire & (fire - 4'd1)) == '0) else $error("two transitions fired");

endmodule
