// tb_bdl_skew_shim: sends 50 random words through skewed shims of skew +1
// and -1 (3 bits) and through a flat-thickness reference, all with ideal
// ends. Checks every lane's tokens and that the first token of bit i leaves
// SKEW*i (or |SKEW|*(W-1-i)) cycles after it entered.
module tb_bdl_skew_shim;
  import bdl_pkg::*;
  localparam int K = 50;
  localparam int W = 3;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [K-1:0] v [W];
  initial for (int i = 0; i < W; i++) v[i] = {$urandom, $urandom};
  logic [K-1:0] r [2][W];
  int got [2][W], t_in [2][W], t_out [2][W];

  for (genvar d = 0; d < 2; d++) begin : g_dut
    token_t x [W], y [W];
    logic [W-1:0] xt, yt;
    int s [W], tl [W];
    for (genvar i = 0; i < W; i++) begin : g_l
      tb_src_lane  #(.K(K)) u_s (.clk, .rst_n, .bits(v[i]), .take(xt[i]), .hold(1'b0), .tok(x[i]), .sent(s[i]));
      tb_sink_lane #(.K(K)) u_k (.clk, .rst_n, .tok(y[i]), .hold(1'b0), .cycle, .take(yt[i]), .bits(r[d][i]), .got(got[d][i]), .t_last(tl[i]));
      always_ff @(posedge clk) begin
        if (!rst_n) begin t_in[d][i] <= -1; t_out[d][i] <= -1; end
        else begin
          if (x[i].full && t_in[d][i] < 0) t_in[d][i] <= cycle;
          if (y[i].full && t_out[d][i] < 0) t_out[d][i] <= cycle;
        end
      end
    end
    bdl_skew_shim #(.W(W), .SKEW(d == 0 ? 1 : -1)) u_dut (.clk, .rst_n, .in_i(x), .in_take(xt), .out_o(y), .out_take(yt));
  end

  function automatic bit done();
    for (int d = 0; d < 2; d++) for (int i = 0; i < W; i++) if (got[d][i] < K) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!done()) @(posedge clk);
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < W; i++) begin
        int th;
        th = (d == 0) ? i : (W - 1 - i);
        checks += 2;
        if (r[d][i] !== v[i]) begin failures++; $display("FAIL shim %0d lane %0d tokens", d, i); end
        if (t_out[d][i] - t_in[d][i] != th) begin
          failures++;
          $display("FAIL shim %0d lane %0d thickness %0d, expected %0d", d, i, t_out[d][i] - t_in[d][i], th);
        end
      end
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
