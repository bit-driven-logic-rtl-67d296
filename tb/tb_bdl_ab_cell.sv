// tb_bdl_ab_cell: streams 100 random (p, a, b, c) sets through a complete
// a.b cell with random stalls, and 100 (a, b) pairs through a first-level
// most-significant cell (no p, no c, no a', no b'). Checks p' and c' against
// the sum and carry of p + c + a*b, and a', b' against a, b.
module tb_bdl_ab_cell;
  import bdl_pkg::*;
  localparam int K = 100;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [K-1:0] pv, av, bv, cv;
  initial begin pv = {$urandom, $urandom, $urandom, $urandom}; av = {$urandom, $urandom, $urandom, $urandom};
                bv = {$urandom, $urandom, $urandom, $urandom}; cv = {$urandom, $urandom, $urandom, $urandom}; end
  logic hold [8];
  always_ff @(posedge clk) for (int h = 0; h < 8; h++) hold[h] <= ($urandom_range(0, 3) == 0);

  // complete cell
  token_t p, a, b, c, po, ao, bo, co;
  logic pt, at, bt, ct, pot, aot, bot, cot;
  logic [K-1:0] rp, ra, rb, rc;
  int s0, s1, s2, s3, g0, g1, g2, g3, t0, t1, t2, t3;
  tb_src_lane  #(.K(K)) u_sp (.clk, .rst_n, .bits(pv), .take(pt), .hold(hold[0]), .tok(p), .sent(s0));
  tb_src_lane  #(.K(K)) u_sa (.clk, .rst_n, .bits(av), .take(at), .hold(hold[1]), .tok(a), .sent(s1));
  tb_src_lane  #(.K(K)) u_sb (.clk, .rst_n, .bits(bv), .take(bt), .hold(hold[2]), .tok(b), .sent(s2));
  tb_src_lane  #(.K(K)) u_sc (.clk, .rst_n, .bits(cv), .take(ct), .hold(hold[3]), .tok(c), .sent(s3));
  tb_sink_lane #(.K(K)) u_kp (.clk, .rst_n, .tok(po), .hold(hold[4]), .cycle, .take(pot), .bits(rp), .got(g0), .t_last(t0));
  tb_sink_lane #(.K(K)) u_ka (.clk, .rst_n, .tok(ao), .hold(hold[5]), .cycle, .take(aot), .bits(ra), .got(g1), .t_last(t1));
  tb_sink_lane #(.K(K)) u_kb (.clk, .rst_n, .tok(bo), .hold(hold[6]), .cycle, .take(bot), .bits(rb), .got(g2), .t_last(t2));
  tb_sink_lane #(.K(K)) u_kc (.clk, .rst_n, .tok(co), .hold(hold[7]), .cycle, .take(cot), .bits(rc), .got(g3), .t_last(t3));
  bdl_ab_cell u_dut (.clk, .rst_n, .p_i(p), .p_take(pt), .a_i(a), .a_take(at), .b_i(b), .b_take(bt),
                     .c_i(c), .c_take(ct), .p_o(po), .p_otake(pot), .a_o(ao), .a_otake(aot),
                     .b_o(bo), .b_otake(bot), .c_o(co), .c_otake(cot));

  // first-level most significant cell
  token_t a1, b1, po1, co1, ao1, bo1;
  logic at1, bt1, pot1, cot1, pt1, ct1;
  logic [K-1:0] rp1, rc1;
  int s4, s5, g4, g5, t4, t5;
  tb_src_lane  #(.K(K)) u_sa1 (.clk, .rst_n, .bits(av), .take(at1), .hold(hold[0]), .tok(a1), .sent(s4));
  tb_src_lane  #(.K(K)) u_sb1 (.clk, .rst_n, .bits(bv), .take(bt1), .hold(hold[1]), .tok(b1), .sent(s5));
  tb_sink_lane #(.K(K)) u_kp1 (.clk, .rst_n, .tok(po1), .hold(hold[2]), .cycle, .take(pot1), .bits(rp1), .got(g4), .t_last(t4));
  tb_sink_lane #(.K(K)) u_kc1 (.clk, .rst_n, .tok(co1), .hold(hold[3]), .cycle, .take(cot1), .bits(rc1), .got(g5), .t_last(t5));
  bdl_ab_cell #(.HAS_P(0), .HAS_C(0), .HAS_COUT(1), .HAS_BOUT(0), .HAS_AOUT(0)) u_first (
    .clk, .rst_n, .p_i('0), .p_take(pt1), .a_i(a1), .a_take(at1), .b_i(b1), .b_take(bt1),
    .c_i('0), .c_take(ct1), .p_o(po1), .p_otake(pot1), .a_o(ao1), .a_otake(1'b0),
    .b_o(bo1), .b_otake(1'b0), .c_o(co1), .c_otake(cot1));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (g0 < K || g1 < K || g2 < K || g3 < K || g4 < K || g5 < K) @(posedge clk);
    for (int k = 0; k < K; k++) begin
      logic [1:0] s;
      s = 2'(pv[k]) + 2'(cv[k]) + 2'(av[k] & bv[k]);
      checks += 6;
      if (rp[k] !== s[0]) begin failures++; $display("FAIL p' %0d", k); end
      if (rc[k] !== s[1]) begin failures++; $display("FAIL c' %0d", k); end
      if (ra[k] !== av[k]) begin failures++; $display("FAIL a' %0d", k); end
      if (rb[k] !== bv[k]) begin failures++; $display("FAIL b' %0d", k); end
      if (rp1[k] !== (av[k] & bv[k])) begin failures++; $display("FAIL first-level p' %0d", k); end
      if (rc1[k] !== 1'b0) begin failures++; $display("FAIL first-level c' %0d", k); end
    end
    checks++;
    if (pt1 || ct1) begin failures++; $display("FAIL absent inputs taken"); end
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
