// tb_bdl_ripple_adder: adds 64 random operand pairs on two 64-bit adders at
// their default size. One has ideal sources and sinks: a sum must leave every
// 2 cycles (throughput 1/2 add per firing time, independent of N). The other
// stalls at random. Sums are checked against A + B computed here.
module tb_bdl_ripple_adder;
  import bdl_pkg::*;
  localparam int N = 64;
  localparam int K = 64;
  localparam int NDUT = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [N-1:0] opa [K], opb [K];
  logic [K-1:0] abits [N], bbits [N];
  initial
    for (int k = 0; k < K; k++) begin
      opa[k] = {$urandom, $urandom};
      opb[k] = {$urandom, $urandom};
      if (k == 0) begin opa[k] = '1; opb[k] = 1; end  // full carry ripple
      if (k == 1) begin opa[k] = '1; opb[k] = '1; end
    end
  always_comb
    for (int k = 0; k < K; k++)
      for (int i = 0; i < N; i++) begin
        abits[i][k] = opa[k][i];
        bbits[i][k] = opb[k][i];
      end

  logic         hold_rnd [NDUT][3];
  int           zt [K];
  logic [K-1:0] zbits [NDUT][N+1];
  int           zgot  [NDUT][N+1];

  for (genvar d = 0; d < NDUT; d++) begin : g_dut
    token_t       a [N], b [N], z [N+1];
    logic [N-1:0] at, bt;
    logic [N:0]   ztk;
    int sa [N], sb [N], tl [N+1];
    always_ff @(posedge clk)
      for (int h = 0; h < 3; h++) hold_rnd[d][h] <= (d == 1) && ($urandom_range(0, 3) == 0);
    for (genvar i = 0; i < N; i++) begin : g_in
      tb_src_lane #(.K(K)) u_sa (.clk, .rst_n, .bits(abits[i]), .take(at[i]), .hold(hold_rnd[d][0]), .tok(a[i]), .sent(sa[i]));
      tb_src_lane #(.K(K)) u_sb (.clk, .rst_n, .bits(bbits[i]), .take(bt[i]), .hold(hold_rnd[d][1]), .tok(b[i]), .sent(sb[i]));
    end
    for (genvar j = 0; j <= N; j++) begin : g_out
      tb_sink_lane #(.K(K)) u_sz (.clk, .rst_n, .tok(z[j]), .hold(hold_rnd[d][2]), .cycle(cycle),
                                  .take(ztk[j]), .bits(zbits[d][j]), .got(zgot[d][j]), .t_last(tl[j]));
    end
    bdl_ripple_adder u_dut (.clk, .rst_n, .a_i(a), .a_take(at), .b_i(b), .b_take(bt), .z_o(z), .z_take(ztk));
    if (d == 0) begin : g_time
      always_ff @(posedge clk)
        if (rst_n && ztk[N] && zgot[0][N] < K) zt[zgot[0][N]] <= cycle;
    end
  end

  function automatic bit all_done();
    for (int d = 0; d < NDUT; d++)
      for (int j = 0; j <= N; j++)
        if (zgot[d][j] < K) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int d = 0; d < NDUT; d++)
      for (int k = 0; k < K; k++) begin
        logic [N:0] z, e;
        for (int j = 0; j <= N; j++) z[j] = zbits[d][j][k];
        e = {1'b0, opa[k]} + {1'b0, opb[k]};
        checks++;
        if (z != e) begin
          failures++;
          if (failures < 10) $display("FAIL dut %0d: %h + %h gave %h", d, opa[k], opb[k], z);
        end
      end
    for (int k = 1; k < K - 1; k++) begin
      checks++;
      if (zt[k+1] - zt[k] != 2) begin
        failures++;
        if (failures < 10) $display("FAIL sum %0d to %0d took %0d cycles", k, k + 1, zt[k+1] - zt[k]);
      end
    end
    $display("ripple adder N=%0d: first z_N at cycle %0d, last at %0d", N, zt[0], zt[K-1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
