// tb_bdl_switch: sends 200 random data tokens with random control tokens
// through the switch, with random stalls on all sides. Checks that x
// receives, in order, exactly the data whose control was 1 and y the data
// whose control was 0.
module tb_bdl_switch;
  import bdl_pkg::*;
  localparam int K = 200;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [K-1:0] av, cv, rx, ry;
  initial for (int w = 0; w < K / 32 + 1; w++) begin
    for (int b = 0; b < 32; b++)
      if (32 * w + b < K) begin
        av[32*w+b] = 1'($urandom);
        cv[32*w+b] = 1'($urandom);
      end
  end
  logic h [4];
  always_ff @(posedge clk) for (int i = 0; i < 4; i++) h[i] <= ($urandom_range(0, 3) == 0);

  token_t a, c, x, y;
  logic at, ct, xt, yt;
  int sa, sc, gx, gy, tx, ty;
  tb_src_lane  #(.K(K)) u_sa (.clk, .rst_n, .bits(av), .take(at), .hold(h[0]), .tok(a), .sent(sa));
  tb_src_lane  #(.K(K)) u_sc (.clk, .rst_n, .bits(cv), .take(ct), .hold(h[1]), .tok(c), .sent(sc));
  tb_sink_lane #(.K(K)) u_kx (.clk, .rst_n, .tok(x), .hold(h[2]), .cycle, .take(xt), .bits(rx), .got(gx), .t_last(tx));
  tb_sink_lane #(.K(K)) u_ky (.clk, .rst_n, .tok(y), .hold(h[3]), .cycle, .take(yt), .bits(ry), .got(gy), .t_last(ty));
  bdl_switch u_dut (.clk, .rst_n, .a_i(a), .a_take(at), .c_i(c), .c_take(ct), .x_o(x), .x_take(xt), .y_o(y), .y_take(yt));

  initial begin
    int nx, ny;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (gx + gy < K) @(posedge clk);
    repeat (3) @(posedge clk);
    nx = 0; ny = 0;
    for (int k = 0; k < K; k++) begin
      checks++;
      if (cv[k]) begin
        if (rx[nx] !== av[k]) begin failures++; $display("FAIL x token %0d", nx); end
        nx++;
      end else begin
        if (ry[ny] !== av[k]) begin failures++; $display("FAIL y token %0d", ny); end
        ny++;
      end
    end
    checks += 2;
    if (gx != nx) begin failures++; $display("FAIL x got %0d tokens, expected %0d", gx, nx); end
    if (gy != ny) begin failures++; $display("FAIL y got %0d tokens, expected %0d", gy, ny); end
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
