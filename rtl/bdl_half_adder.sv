// bdl_half_adder: the H-ADD operator, a half adder written in AND-OR form as
// four transitions that share the input places a, b and the output places
// c (carry) and z (sum).
//
// Each transition is labelled with one input pattern and emits constant
// tokens: (1,1) -> c=1 z=0, (1,0) and (0,1) -> c=0 z=1, (0,0) -> c=0 z=0.
// Exactly one of them can be enabled once both inputs hold tokens and both
// outputs are empty; it fires in one clock, consuming a and b. This is the
// structure of the half-adder example net; the synchronous firing is this
// design's choice. The module owns its output places (c_o, z_o) and reads
// the input places owned by its environment.
module bdl_half_adder
  import bdl_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  token_t a_i,
  output logic   a_take,
  input  token_t b_i,
  output logic   b_take,
  output token_t c_o,
  input  logic   c_take,
  output token_t z_o,
  input  logic   z_take
);

  localparam arc_t A_ARC[4] = '{ARC_ONE, ARC_ONE, ARC_ZERO, ARC_ZERO};
  localparam arc_t B_ARC[4] = '{ARC_ONE, ARC_ZERO, ARC_ONE, ARC_ZERO};
  localparam arc_t C_ARC[4] = '{ARC_ONE, ARC_ZERO, ARC_ZERO, ARC_ZERO};
  localparam arc_t Z_ARC[4] = '{ARC_ZERO, ARC_ONE, ARC_ONE, ARC_ZERO};

  logic [3:0] fire;
  logic [1:0] val [4];

  for (genvar t = 0; t < 4; t++) begin : g_t
    localparam arc_t IA[2] = '{A_ARC[t], B_ARC[t]};
    localparam arc_t OA[2] = '{Z_ARC[t], C_ARC[t]};  // [0] = z, [1] = c
    bdl_transition #(
      .NI(2), .NO(2),
      .IN_ARC(IA),
      .OUT_ARC(OA)
    ) u_t (
      .in_tok  ('{a_i, b_i}),
      .out_full({c_o.full, z_o.full}),
      .fire    (fire[t]),
      .out_val (val[t])
    );
  end

  logic fired, c_val, z_val;
  always_comb begin
    fired = |fire;
    c_val = 1'b0;
    z_val = 1'b0;
    for (int t = 0; t < 4; t++)
      if (fire[t]) begin
        c_val = val[t][1];
        z_val = val[t][0];
      end
  end

  assign a_take = fired;
  assign b_take = fired;

  bdl_place u_c (.clk, .rst_n, .put(fired), .put_val(c_val), .take(c_take), .tok(c_o));
  bdl_place u_z (.clk, .rst_n, .put(fired), .put_val(z_val), .take(z_take), .tok(z_o));

  // the transitions' input patterns are disjoint: never two firings at once
  always_ff @(posedge clk)
    if (rst_n) assert ((fire & (fire - 4'd1)) == '0) else $error("two transitions fired");

endmodule
