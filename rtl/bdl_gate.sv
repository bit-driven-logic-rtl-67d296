// bdl_gate: W-bit gate; the data tokens a_i cannot pass to z_i until a
// control token 1 has been delivered to c.
//
// A distributing transition takes the control token and puts a copy into one
// control place per bit. Bit transition i needs a data token in a_i and a 1
// in its control place and an empty z_i; it moves the data token to z_i and
// consumes the control copy. So one control token releases exactly one word.
// A 0 control token is distributed but never accepted, so it stops the gate.
// The net is the document's 3-bit gate; the clocked firing is this design's
// choice. Timing: with the control token already present the word appears
// 2 cycles after c was filled, 1 cycle after a_i if c arrived earlier.
module bdl_gate
  import bdl_pkg::*;
#(
  parameter int W = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  token_t         a_i     [W],
  output logic   [W-1:0] a_take,
  input  token_t         c_i,
  output logic           c_take,
  output token_t         z_o     [W],
  input  logic   [W-1:0] z_take
);

  localparam arc_t BIT_IN[2] = '{ARC_PLAIN, ARC_ONE};

  token_t         ctl      [W];
  logic   [W-1:0] ctl_full, ctl_take, dist_val;
  logic           dist_fire;

  for (genvar i = 0; i < W; i++) begin : g_full
    assign ctl_full[i] = ctl[i].full;
  end

  bdl_transition #(.NI(1), .NO(W)) u_dist (
    .in_tok('{c_i}), .out_full(ctl_full), .fire(dist_fire), .out_val(dist_val)
  );
  assign c_take = dist_fire;

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic fire;
    logic val;
    bdl_place u_ctl (.clk, .rst_n, .put(dist_fire), .put_val(dist_val[i]), .take(ctl_take[i]), .tok(ctl[i]));
    bdl_transition #(.NI(2), .NO(1), .IN_ARC(BIT_IN)) u_t (
      .in_tok('{a_i[i], ctl[i]}), .out_full(z_o[i].full), .fire(fire), .out_val(val)
    );
    assign a_take[i]   = fire;
    assign ctl_take[i] = fire;
    bdl_place u_z (.clk, .rst_n, .put(fire), .put_val(val), .take(z_take[i]), .tok(z_o[i]));
  end

endmodule
