// tb_bdl_par_to_ser: offers 60 random 3-bit words whose bits arrive at
// random, independent times, and checks that the serial output carries
// bit 0, bit 1, bit 2 of each word in order. With ideal ends the converter
// must emit one token every 2 cycles.
module tb_bdl_par_to_ser;
  import bdl_pkg::*;
  localparam int K = 60;
  localparam int W = 3;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [K-1:0] v [W];
  initial for (int i = 0; i < W; i++) v[i] = {$urandom, $urandom};
  logic [W*K-1:0] r [2];
  int got [2], tl [2], t_first [2];

  for (genvar d = 0; d < 2; d++) begin : g_dut
    token_t a [W], z;
    logic [W-1:0] at;
    logic zt, hz;
    logic hs [W];
    int sa [W];
    always_ff @(posedge clk) begin
      hz <= (d == 1) && ($urandom_range(0, 3) == 0);
      for (int i = 0; i < W; i++) hs[i] <= (d == 1) && ($urandom_range(0, 2) == 0);
    end
    for (genvar i = 0; i < W; i++) begin : g_l
      tb_src_lane #(.K(K)) u_s (.clk, .rst_n, .bits(v[i]), .take(at[i]), .hold(hs[i]), .tok(a[i]), .sent(sa[i]));
    end
    tb_sink_lane #(.K(W*K)) u_k (.clk, .rst_n, .tok(z), .hold(hz), .cycle, .take(zt), .bits(r[d]), .got(got[d]), .t_last(tl[d]));
    bdl_par_to_ser u_dut (.clk, .rst_n, .a_i(a), .a_take(at), .z_o(z), .z_take(zt));
    always_ff @(posedge clk)
      if (!rst_n) t_first[d] <= -1;
      else if (z.full && t_first[d] < 0) t_first[d] <= cycle;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (got[0] < W * K || got[1] < W * K) @(posedge clk);
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < K; k++)
        for (int i = 0; i < W; i++) begin
          checks++;
          if (r[d][W*k+i] !== v[i][k]) begin
            failures++;
            if (failures < 10) $display("FAIL dut %0d word %0d bit %0d", d, k, i);
          end
        end
    checks++;
    if (tl[0] - t_first[0] != 2 * (W * K - 1)) begin failures++; $display("FAIL rate: %0d cycles", tl[0] - t_first[0]); end
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
