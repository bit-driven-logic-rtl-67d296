// tb_bdl_ab_row: streams random (P, A, b) sets through a middle-level A.b
// module (W = 4) and a first-level one, with random stalls on the middle
// one. Checks P' = P + A*b (first level: P' = A*b, p'_W = 0) and A' = A.
module tb_bdl_ab_row;
  import bdl_pkg::*;
  localparam int W = 4;
  localparam int K = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [W-1:0] opp [K], opa [K];
  logic         opb [K];
  logic [K-1:0] pbits [W], abits [W], bbits;
  initial
    for (int k = 0; k < K; k++) begin
      opp[k] = W'($urandom);
      opa[k] = W'($urandom);
      opb[k] = 1'($urandom);
    end
  always_comb
    for (int k = 0; k < K; k++) begin
      bbits[k] = opb[k];
      for (int i = 0; i < W; i++) begin
        pbits[i][k] = opp[k][i];
        abits[i][k] = opa[k][i];
      end
    end

  logic [K-1:0] pobits [2][W+1], aobits [2][W];
  int           pogot  [2][W+1], aogot [2][W];

  for (genvar d = 0; d < 2; d++) begin : g_dut
    token_t       p [W], a [W], b, po [W+1], ao [W];
    logic [W-1:0] pt, at, aot;
    logic         bt;
    logic [W:0]   pot;
    logic         hold [4];
    int sp [W], sa [W], sb, t1 [W+1], t2 [W];
    always_ff @(posedge clk)
      for (int h = 0; h < 4; h++) hold[h] <= (d == 0) && ($urandom_range(0, 3) == 0);
    for (genvar i = 0; i < W; i++) begin : g_in
      tb_src_lane #(.K(K)) u_sp (.clk, .rst_n, .bits(pbits[i]), .take(pt[i]), .hold(hold[0]), .tok(p[i]), .sent(sp[i]));
      tb_src_lane #(.K(K)) u_sa (.clk, .rst_n, .bits(abits[i]), .take(at[i]), .hold(hold[1]), .tok(a[i]), .sent(sa[i]));
      tb_sink_lane #(.K(K)) u_ka (.clk, .rst_n, .tok(ao[i]), .hold(hold[3]), .cycle(cycle),
                                  .take(aot[i]), .bits(aobits[d][i]), .got(aogot[d][i]), .t_last(t2[i]));
    end
    tb_src_lane #(.K(K)) u_sb (.clk, .rst_n, .bits(bbits), .take(bt), .hold(hold[2]), .tok(b), .sent(sb));
    for (genvar j = 0; j <= W; j++) begin : g_out
      tb_sink_lane #(.K(K)) u_kp (.clk, .rst_n, .tok(po[j]), .hold(hold[3]), .cycle(cycle),
                                  .take(pot[j]), .bits(pobits[d][j]), .got(pogot[d][j]), .t_last(t1[j]));
    end
    bdl_ab_row #(.W(W), .FIRST(d == 1)) u_dut (
      .clk, .rst_n, .p_i(p), .p_take(pt), .a_i(a), .a_take(at), .b_i(b), .b_take(bt),
      .p_o(po), .p_otake(pot), .a_o(ao), .a_otake(aot)
    );
  end

  function automatic bit all_done();
    for (int d = 0; d < 2; d++) begin
      for (int j = 0; j <= W; j++) if (pogot[d][j] < K) return 0;
      for (int j = 0; j < W; j++) if (aogot[d][j] < K) return 0;
    end
    return 1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < K; k++) begin
        logic [W:0] pz, pe;
        logic [W-1:0] az;
        for (int j = 0; j <= W; j++) pz[j] = pobits[d][j][k];
        for (int j = 0; j < W; j++) az[j] = aobits[d][j][k];
        pe = (d == 1 ? '0 : (W+1)'(opp[k])) + (opb[k] ? (W+1)'(opa[k]) : '0);
        checks += 2;
        if (pz != pe) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d: P=%0d A=%0d b=%0d gave P'=%0d", d, opp[k], opa[k], opb[k], pz);
        end
        if (az != opa[k]) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d: A'=%0d for A=%0d", d, az, opa[k]);
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
