// bdl_chain: a simple linear chain of DEPTH identity transitions, i.e. a
// self-timed FIFO one bit wide and DEPTH places deep.
//
// Each identity transition moves the token of its input place to its empty
// output place in one clock, keeping its color. The input place belongs to
// the upstream side; the module owns the DEPTH places after it, the last of
// which is out_o. A chain with half of its places full passes one token every
// 2 cycles, the most a chain can carry. DEPTH = 0 is a plain connection
// (thickness 0), which a skewed shim needs for its first bit. The chain is the
// document's linear chain and its identity operator; the clocked firing is
// this design's choice.
module bdl_chain
  import bdl_pkg::*;
#(
  parameter int DEPTH = 6
) (
  input  logic   clk,
  input  logic   rst_n,
  input  token_t in_i,
  output logic   in_take,
  output token_t out_o,
  input  logic   out_take
);

  if (DEPTH == 0) begin : g_wire
    assign out_o   = in_i;
    assign in_take = out_take;
  end else begin : g_chain
    token_t         pl   [DEPTH+1];  // pl[0] is the input place
    logic   [DEPTH:0] take;

    assign pl[0]   = in_i;
    assign in_take = take[0];
    assign out_o   = pl[DEPTH];
    assign take[DEPTH] = out_take;

    for (genvar k = 0; k < DEPTH; k++) begin : g_stage
      // identity transition k: pl[k] -> pl[k+1]
      logic fire;
      assign fire    = pl[k].full && !pl[k+1].full;
      assign take[k] = fire;
      bdl_place u_pl (
        .clk, .rst_n,
        .put(fire), .put_val(pl[k].val), .take(take[k+1]), .tok(pl[k+1])
      );
    end
  end

endmodule
