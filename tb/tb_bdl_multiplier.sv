// tb_bdl_multiplier: streams all 256 operand pairs through two 4x4
// multipliers. One has ideal sources and sinks and must deliver a product
// every 2 cycles in steady state; the other has sources and sinks that stall
// at random. Every product is checked against A*B computed here.
module tb_bdl_multiplier;
  import bdl_pkg::*;
  localparam int W = 4;
  localparam int K = 1 << (2 * W);
  localparam int NDUT = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [K-1:0] abits [W];
  logic [K-1:0] bbits [W];
  always_comb
    for (int k = 0; k < K; k++)
      for (int i = 0; i < W; i++) begin
        abits[i][k] = k[i];
        bbits[i][k] = k[W+i];
      end

  logic   hold_rnd [NDUT][3];
  int     zt [K];        // arrival cycle of z_{2W-1} of product k on DUT 0
  logic [K-1:0] zbits [NDUT][2*W];
  int     zgot [NDUT][2*W];

  for (genvar d = 0; d < NDUT; d++) begin : g_dut
    token_t         a [W], b [W], z [2*W];
    logic   [W-1:0] at, bt;
    logic   [2*W-1:0] zt_take;
    int sa [W], sb [W], tl [2*W];

    always_ff @(posedge clk)
      for (int h = 0; h < 3; h++) hold_rnd[d][h] <= (d == 1) && ($urandom_range(0, 2) == 0);

    for (genvar i = 0; i < W; i++) begin : g_in
      tb_src_lane #(.K(K)) u_sa (.clk, .rst_n, .bits(abits[i]), .take(at[i]), .hold(hold_rnd[d][0]), .tok(a[i]), .sent(sa[i]));
      tb_src_lane #(.K(K)) u_sb (.clk, .rst_n, .bits(bbits[i]), .take(bt[i]), .hold(hold_rnd[d][1]), .tok(b[i]), .sent(sb[i]));
    end
    for (genvar j = 0; j < 2 * W; j++) begin : g_out
      tb_sink_lane #(.K(K)) u_sz (.clk, .rst_n, .tok(z[j]), .hold(hold_rnd[d][2]), .cycle(cycle),
                                  .take(zt_take[j]), .bits(zbits[d][j]), .got(zgot[d][j]), .t_last(tl[j]));
    end

    bdl_multiplier #(.W(W)) u_dut (
      .clk, .rst_n, .a_i(a), .a_take(at), .b_i(b), .b_take(bt), .z_o(z), .z_take(zt_take)
    );

    if (d == 0) begin : g_time
      always_ff @(posedge clk)
        if (rst_n && zt_take[2*W-1] && zgot[0][2*W-1] < K) zt[zgot[0][2*W-1]] <= cycle;
    end
  end

  function automatic bit all_done();
    for (int d = 0; d < NDUT; d++)
      for (int j = 0; j < 2 * W; j++)
        if (zgot[d][j] < K) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int d = 0; d < NDUT; d++) begin
      for (int j = 0; j < 2 * W; j++) begin
        checks++;
        if (zgot[d][j] != K) begin
          failures++;
          $display("FAIL dut %0d lane z%0d delivered %0d tokens", d, j, zgot[d][j]);
        end
      end
      for (int k = 0; k < K; k++) begin
        logic [2*W-1:0] z;
        int exp_p;
        for (int j = 0; j < 2 * W; j++) z[j] = zbits[d][j][k];
        exp_p = (k % (1 << W)) * (k >> W);
        checks++;
        if (z != exp_p[2*W-1:0]) begin
          failures++;
          if (failures < 10) $display("FAIL dut %0d: %0d * %0d gave %0d", d, k % (1 << W), k >> W, z);
        end
      end
    end
    // steady-state rate: one product every 2 cycles
    for (int k = 2 * W; k < K - 1; k++) begin
      checks++;
      if (zt[k+1] - zt[k] != 2) begin
        failures++;
        if (failures < 10) $display("FAIL product %0d to %0d took %0d cycles", k, k + 1, zt[k+1] - zt[k]);
      end
    end
    $display("multiplier: first product at cycle %0d, last at %0d", zt[0], zt[K-1]);
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
