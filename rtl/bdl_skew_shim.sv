// bdl_skew_shim: identity operator whose thickness grows linearly with bit
// position, used to change the skew of a word from a to a + SKEW.
//
// Bit i passes through SKEW*i identity transitions when SKEW > 0 and
// |SKEW|*(W-1-i) when SKEW < 0, so the thinnest bit has thickness 0 (a plain
// connection) and the thickest |SKEW|*(W-1). The bit lanes are uncoupled
// chains. Inserted between an operator with output skew a and one with input
// skew b, with SKEW = b - a, it restores the throughput of one word every 2
// cycles. The rule and the Fig.-15 defaults (3 bits, skew 1) follow the
// document; the clocked firing is this design's choice.
module bdl_skew_shim
  import bdl_pkg::*;
#(
  parameter int W    = 3,
  parameter int SKEW = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  token_t         in_i    [W],
  output logic   [W-1:0] in_take,
  output token_t         out_o   [W],
  input  logic   [W-1:0] out_take
);

  for (genvar i = 0; i < W; i++) begin : g_lane
    localparam int THICK = (SKEW >= 0) ? SKEW * i : -SKEW * (W - 1 - i);
    bdl_chain #(.DEPTH(THICK)) u_lane (
      .clk, .rst_n,
      .in_i(in_i[i]), .in_take(in_take[i]),
      .out_o(out_o[i]), .out_take(out_take[i])
    );
  end

endmodule
