// bdl_flat_shim: identity operator of constant thickness THICK on a W-bit
// word, built from W uncoupled linear chains of THICK identity transitions.
//
// Placed in series with the thinner of two parallel operators it balances
// the two paths so that the pair keeps the full throughput of one token per
// 2 cycles per bit. Each bit's token leaves THICK cycles after it entered when
// nothing downstream waits. The structure is the document's; W and THICK
// defaults are this design's choice.
module bdl_flat_shim
  import bdl_pkg::*;
#(
  parameter int W     = 4,
  parameter int THICK = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  token_t         in_i    [W],
  output logic   [W-1:0] in_take,
  output token_t         out_o   [W],
  input  logic   [W-1:0] out_take
);

  for (genvar i = 0; i < W; i++) begin : g_lane
    bdl_chain #(.DEPTH(THICK)) u_lane (
      .clk, .rst_n,
      .in_i(in_i[i]), .in_take(in_take[i]),
      .out_o(out_o[i]), .out_take(out_take[i])
    );
  end

endmodule
