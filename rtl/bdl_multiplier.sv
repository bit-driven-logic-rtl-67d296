// bdl_multiplier: W x W unsigned array multiplier in bit-driven logic,
// Z = A * B with 2W result bits, every bit a self-timed token.
//
// Left shift and add: level k (an A.b module) adds A*b_k to the partial
// result of level k-1 shifted right by one bit. Bit p'_0 of level k is
// product bit z_k; bits p'_1..p'_W feed p_0..p_{W-1} of level k+1, and A
// travels down the levels as A'. The last level delivers z_{W-1}..z_{2W-1}.
// Because every bit is held in its own place, all W levels and all bit
// positions work on different products at once: with ideal sources and
// sinks a product enters and leaves every 2 cycles, the rate of a single
// bit cell, for any W. Best input skews: A skew 1 (a_i one cycle after
// a_{i-1}), B skew 2; low result bits leave with skew 2, high ones with skew
// 1. Any other arrival order gives the same products, only later. The
// organisation and the 4-bit default are the document's; the clocked firing
// and the first level's explicit 0 carry into p'_W are this design's choice.
module bdl_multiplier
  import bdl_pkg::*;
#(
  parameter int W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  token_t           a_i    [W],
  output logic   [W-1:0]   a_take,
  input  token_t           b_i    [W],
  output logic   [W-1:0]   b_take,
  output token_t           z_o    [2*W],
  input  logic   [2*W-1:0] z_take
);

  token_t         lp      [W][W+1];  // p' places of each level
  logic   [W:0]   lp_take [W];
  token_t         la      [W][W];    // a' places of each level
  logic   [W-1:0] la_take [W];

  for (genvar k = 0; k < W; k++) begin : g_lvl
    token_t         pin [W];
    logic   [W-1:0] pin_take;
    token_t         ain [W];
    logic   [W-1:0] ain_take;

    if (k == 0) begin : g_first
      for (genvar j = 0; j < W; j++) begin : g_j
        assign pin[j] = '0;
        assign ain[j] = a_i[j];
      end
      assign a_take = ain_take;
    end else begin : g_next
      for (genvar j = 0; j < W; j++) begin : g_j
        assign pin[j]            = lp[k-1][j+1];
        assign lp_take[k-1][j+1] = pin_take[j];
        assign ain[j]            = la[k-1][j];
      end
      assign la_take[k-1] = ain_take;
    end

    bdl_ab_row #(.W(W), .FIRST(k == 0), .LAST(k == W - 1)) u_row (
      .clk, .rst_n,
      .p_i(pin), .p_take(pin_take),
      .a_i(ain), .a_take(ain_take),
      .b_i(b_i[k]), .b_take(b_take[k]),
      .p_o(lp[k]), .p_otake(lp_take[k]),
      .a_o(la[k]), .a_otake(la_take[k])
    );

    if (k < W - 1) begin : g_z
      assign z_o[k]        = lp[k][0];
      assign lp_take[k][0] = z_take[k];
    end
  end

  // the last level's A' is not produced
  assign la_take[W-1] = '0;

  for (genvar j = 0; j <= W; j++) begin : g_zh
    assign z_o[W-1+j]        = lp[W-1][j];
    assign lp_take[W-1][j]   = z_take[W-1+j];
  end

endmodule
