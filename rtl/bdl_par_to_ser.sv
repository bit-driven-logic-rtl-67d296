// bdl_par_to_ser: converts a W-bit word held in W token places into a serial
// stream of W tokens on one output place z, bit 0 first (PAR3-TO-SER for
// W = 3).
//
// A ring of W sequencing places holds one 1 token, initially beside bit 0.
// Bit transition i needs a token in a_i and the sequencing token (arc label
// 1) in its place; it moves a_i to z and passes the sequencing token to the
// place of bit i+1 (bit W-1 hands it back to bit 0). So bits leave in order
// even when they arrive in any order, and bit i of the next word can enter
// as soon as a_i is emptied. Net and initial marking follow the document;
// the direction of the ring is read from the figure and the clocked firing
// is this design's choice. Rate: one output token every 2 cycles at best
// (z must be emptied between tokens). W must be at least 2.
module bdl_par_to_ser
  import bdl_pkg::*;
#(
  parameter int W = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  token_t         a_i    [W],
  output logic   [W-1:0] a_take,
  output token_t         z_o,
  input  logic           z_take
);

  localparam arc_t SEQ_IN[2]  = '{ARC_PLAIN, ARC_ONE};
  localparam arc_t SEQ_OUT[2] = '{ARC_ONE, ARC_PLAIN};  // [0] = next sequencing place, [1] = z

  token_t         seq  [W];
  logic   [W-1:0] fire;
  logic   [1:0]   val  [W];

  for (genvar i = 0; i < W; i++) begin : g_bit
    localparam int NXT = (i + 1) % W;
    localparam int PRV = (i + W - 1) % W;
    bdl_transition #(.NI(2), .NO(2), .IN_ARC(SEQ_IN), .OUT_ARC(SEQ_OUT)) u_t (
      .in_tok('{a_i[i], seq[i]}), .out_full({z_o.full, seq[NXT].full}),
      .fire(fire[i]), .out_val(val[i])
    );
    assign a_take[i] = fire[i];
    bdl_place #(.INIT_FULL(i == 0), .INIT_VAL(1'b1)) u_seq (
      .clk, .rst_n, .put(fire[PRV]), .put_val(val[PRV][0]), .take(fire[i]), .tok(seq[i])
    );
  end

  logic z_put, z_val;
  always_comb begin
    z_put = |fire;
    z_val = 1'b0;
    for (int i = 0; i < W; i++)
      if (fire[i]) z_val = val[i][1];
  end
  bdl_place u_z (.clk, .rst_n, .put(z_put), .put_val(z_val), .take(z_take), .tok(z_o));

endmodule
