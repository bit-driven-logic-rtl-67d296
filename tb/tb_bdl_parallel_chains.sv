// tb_bdl_parallel_chains: sends 100 random tokens through a balanced pair of
// chains (M = N = 4) and an unbalanced pair (M = 2, N = 6) with ideal ends.
// Checks the tokens, that the balanced pair carries one token every 2
// cycles, and that the unbalanced pair stays within the bound M/(M+N)
// tokens per cycle.
module tb_bdl_parallel_chains;
  import bdl_pkg::*;
  localparam int K = 100;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [K-1:0] v;
  initial v = {$urandom, $urandom, $urandom, $urandom};
  logic [K-1:0] r [2];
  int got [2], tl [2], t_out [2];
  int tu [K];  // arrival cycle of each token of the unbalanced pair

  for (genvar d = 0; d < 2; d++) begin : g_dut
    token_t x, y;
    logic xt, yt;
    int s;
    tb_src_lane  #(.K(K)) u_s (.clk, .rst_n, .bits(v), .take(xt), .hold(1'b0), .tok(x), .sent(s));
    tb_sink_lane #(.K(K)) u_k (.clk, .rst_n, .tok(y), .hold(1'b0), .cycle, .take(yt), .bits(r[d]), .got(got[d]), .t_last(tl[d]));
    bdl_parallel_chains #(.M(d == 0 ? 4 : 2), .N(d == 0 ? 4 : 6)) u_dut (
      .clk, .rst_n, .in_i(x), .in_take(xt), .out_o(y), .out_take(yt));
    always_ff @(posedge clk)
      if (!rst_n) t_out[d] <= -1;
      else if (y.full && t_out[d] < 0) t_out[d] <= cycle;
    if (d == 1) begin : g_t
      always_ff @(posedge clk) if (rst_n && yt && got[1] < K) tu[got[1]] <= cycle;
    end
  end

  initial begin
    int span;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (got[0] < K || got[1] < K) @(posedge clk);
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < K; k++) begin
        checks++;
        if (r[d][k] !== v[k]) begin failures++; $display("FAIL pair %0d token %0d", d, k); end
      end
    checks++;
    if (tl[0] - t_out[0] != 2 * (K - 1)) begin failures++; $display("FAIL balanced rate: %0d cycles", tl[0] - t_out[0]); end
    // steady state (last 48 intervals): rate must not exceed M/(M+N) = 2/8
    span = tu[K-1] - tu[K-1-48];
    checks++;
    if (48 * 8 > span * 2) begin failures++; $display("FAIL unbalanced rate above bound: %0d cycles", span); end
    $display("unbalanced pair: %0d tokens in %0d cycles", 48, span);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
