// tb_bdl_gate: offers 20 random 3-bit words to the gate while the control
// token is withheld for 30 cycles, then releases control tokens at random.
// Checks that no data passes before its control token, that no lane ever
// passes more words than control tokens were given, and that the words come
// out intact and in order.
module tb_bdl_gate;
  import bdl_pkg::*;
  localparam int K = 20;
  localparam int W = 3;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [K-1:0] v [W], r [W];
  initial for (int i = 0; i < W; i++) v[i] = 20'($urandom);

  token_t a [W], z [W], c;
  logic [W-1:0] at, zt;
  logic ct, ch;
  int sa [W], got [W], tl [W], sc;
  always_ff @(posedge clk) ch <= (cycle < 30) || ($urandom_range(0, 3) != 0);

  for (genvar i = 0; i < W; i++) begin : g_l
    tb_src_lane  #(.K(K)) u_s (.clk, .rst_n, .bits(v[i]), .take(at[i]), .hold(1'b0), .tok(a[i]), .sent(sa[i]));
    tb_sink_lane #(.K(K)) u_k (.clk, .rst_n, .tok(z[i]), .hold(1'b0), .cycle, .take(zt[i]), .bits(r[i]), .got(got[i]), .t_last(tl[i]));
  end
  tb_src_lane #(.K(K)) u_c (.clk, .rst_n, .bits('1), .take(ct), .hold(ch), .tok(c), .sent(sc));
  bdl_gate u_dut (.clk, .rst_n, .a_i(a), .a_take(at), .c_i(c), .c_take(ct), .z_o(z), .z_take(zt));

  int ctl_taken;
  always_ff @(posedge clk)
    if (!rst_n) ctl_taken <= 0;
    else if (ct) ctl_taken <= ctl_taken + 1;

  always @(posedge clk)
    if (rst_n)
      for (int i = 0; i < W; i++) begin
        checks++;
        if (got[i] + (z[i].full ? 1 : 0) > ctl_taken) begin
          failures++;
          $display("FAIL lane %0d passed a word without a control token (cycle %0d)", i, cycle);
        end
      end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (got[0] < K || got[1] < K || got[2] < K) @(posedge clk);
    for (int i = 0; i < W; i++) begin
      checks++;
      if (r[i] !== v[i]) begin failures++; $display("FAIL lane %0d data", i); end
      checks++;
      if (tl[i] < 30) begin failures++; $display("FAIL lane %0d finished before control", i); end
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
