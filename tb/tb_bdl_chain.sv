// tb_bdl_chain: passes 100 random tokens through a 6-deep linear chain with
// ideal ends and through one with random stalls. Checks order and colors,
// that the first token needs exactly DEPTH cycles, and that the ideal chain
// carries one token every 2 cycles.
module tb_bdl_chain;
  import bdl_pkg::*;
  localparam int K = 100;
  localparam int DEPTH = 6;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [K-1:0] v;
  initial v = {$urandom, $urandom, $urandom, $urandom};
  logic [K-1:0] r [2];
  int got [2], tl [2], t_in [2], t_out [2];

  for (genvar d = 0; d < 2; d++) begin : g_dut
    token_t x, y;
    logic xt, yt, h0, h1;
    int s;
    always_ff @(posedge clk) begin
      h0 <= (d == 1) && ($urandom_range(0, 2) == 0);
      h1 <= (d == 1) && ($urandom_range(0, 2) == 0);
    end
    tb_src_lane  #(.K(K)) u_s (.clk, .rst_n, .bits(v), .take(xt), .hold(h0), .tok(x), .sent(s));
    tb_sink_lane #(.K(K)) u_k (.clk, .rst_n, .tok(y), .hold(h1), .cycle, .take(yt), .bits(r[d]), .got(got[d]), .t_last(tl[d]));
    bdl_chain u_dut (.clk, .rst_n, .in_i(x), .in_take(xt), .out_o(y), .out_take(yt));
    always_ff @(posedge clk) begin
      if (!rst_n) begin t_in[d] <= -1; t_out[d] <= -1; end
      else begin
        if (x.full && t_in[d] < 0) t_in[d] <= cycle;
        if (y.full && t_out[d] < 0) t_out[d] <= cycle;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (got[0] < K || got[1] < K) @(posedge clk);
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < K; k++) begin
        checks++;
        if (r[d][k] !== v[k]) begin failures++; $display("FAIL chain %0d token %0d", d, k); end
      end
    checks++;
    if (t_out[0] - t_in[0] != DEPTH) begin failures++; $display("FAIL latency %0d", t_out[0] - t_in[0]); end
    checks++;
    if (tl[0] - t_out[0] != 2 * (K - 1)) begin failures++; $display("FAIL rate: %0d cycles", tl[0] - t_out[0]); end
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
