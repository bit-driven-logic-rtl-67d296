// tb_bdl_add3: streams 300 random operand triples through three 4-bit
// three-operand adders: one with ideal sources and sinks (a sum every 2
// cycles in steady state), one stalling at random, and one without the
// balancing transition on the top carry (a sum every 3 cycles). Every sum is
// checked against A + B + C computed here.
module tb_bdl_add3;
  import bdl_pkg::*;
  localparam int N = 4;
  localparam int K = 300;
  localparam int NDUT = 3;  // 0 ideal, 1 random stalls, 2 ideal without the balancing transition

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [N-1:0] opa [K], opb [K], opc [K];
  logic [K-1:0] abits [N], bbits [N], cbits [N];
  initial
    for (int k = 0; k < K; k++) begin
      opa[k] = N'($urandom);
      opb[k] = N'($urandom);
      opc[k] = N'($urandom);
      if (k == 0) begin opa[k] = '1; opb[k] = '1; opc[k] = '1; end
    end
  always_comb
    for (int k = 0; k < K; k++)
      for (int i = 0; i < N; i++) begin
        abits[i][k] = opa[k][i];
        bbits[i][k] = opb[k][i];
        cbits[i][k] = opc[k][i];
      end

  logic         hold_rnd [NDUT][4];
  int           zt [K], zu [K];
  logic [K-1:0] zbits [NDUT][N+2];
  int           zgot  [NDUT][N+2];

  for (genvar d = 0; d < NDUT; d++) begin : g_dut
    token_t       a [N], b [N], c [N], z [N+2];
    logic [N-1:0] at, bt, ct;
    logic [N+1:0] ztk;
    int sa [N], sb [N], sc [N], tl [N+2];
    always_ff @(posedge clk)
      for (int h = 0; h < 4; h++) hold_rnd[d][h] <= (d == 1) && ($urandom_range(0, 3) == 0);
    for (genvar i = 0; i < N; i++) begin : g_in
      tb_src_lane #(.K(K)) u_sa (.clk, .rst_n, .bits(abits[i]), .take(at[i]), .hold(hold_rnd[d][0]), .tok(a[i]), .sent(sa[i]));
      tb_src_lane #(.K(K)) u_sb (.clk, .rst_n, .bits(bbits[i]), .take(bt[i]), .hold(hold_rnd[d][1]), .tok(b[i]), .sent(sb[i]));
      tb_src_lane #(.K(K)) u_sc (.clk, .rst_n, .bits(cbits[i]), .take(ct[i]), .hold(hold_rnd[d][3]), .tok(c[i]), .sent(sc[i]));
    end
    for (genvar j = 0; j < N + 2; j++) begin : g_out
      tb_sink_lane #(.K(K)) u_sz (.clk, .rst_n, .tok(z[j]), .hold(hold_rnd[d][2]), .cycle(cycle),
                                  .take(ztk[j]), .bits(zbits[d][j]), .got(zgot[d][j]), .t_last(tl[j]));
    end
    bdl_add3 #(.BALANCE(d != 2)) u_dut (.clk, .rst_n, .a_i(a), .a_take(at), .b_i(b), .b_take(bt), .c_i(c), .c_take(ct),
                    .z_o(z), .z_take(ztk));
    if (d == 0) begin : g_time
      always_ff @(posedge clk)
        if (rst_n && ztk[N+1] && zgot[0][N+1] < K) zt[zgot[0][N+1]] <= cycle;
    end
    if (d == 2) begin : g_time_u
      always_ff @(posedge clk)
        if (rst_n && ztk[N+1] && zgot[2][N+1] < K) zu[zgot[2][N+1]] <= cycle;
    end
  end

  function automatic bit all_done();
    for (int d = 0; d < NDUT; d++)
      for (int j = 0; j < N + 2; j++)
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
        logic [N+1:0] z, e;
        for (int j = 0; j < N + 2; j++) z[j] = zbits[d][j][k];
        e = (N+2)'(opa[k]) + (N+2)'(opb[k]) + (N+2)'(opc[k]);
        checks++;
        if (z != e) begin
          failures++;
          if (failures < 10) $display("FAIL dut %0d: %0d + %0d + %0d gave %0d", d, opa[k], opb[k], opc[k], z);
        end
      end
    for (int k = 2; k < K - 1; k++) begin
      checks++;
      if (zt[k+1] - zt[k] != 2) begin
        failures++;
        if (failures < 10) $display("FAIL sum %0d to %0d took %0d cycles", k, k + 1, zt[k+1] - zt[k]);
      end
    end
    // without the balancing transition the top carry arc limits the rate
    for (int k = 2; k < K - 1; k++) begin
      checks++;
      if (zu[k+1] - zu[k] != 3) begin
        failures++;
        if (failures < 10) $display("FAIL unbalanced sum %0d to %0d took %0d cycles", k, k + 1, zu[k+1] - zu[k]);
      end
    end
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
