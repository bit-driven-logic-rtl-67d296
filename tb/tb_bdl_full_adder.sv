// tb_bdl_full_adder: streams 64 random bit triples through an ADD operator
// with ideal sources and sinks and checks carry and sum of each pair against
// the majority and the parity of a, b, c, and that a result leaves every 2 cycles.
module tb_bdl_full_adder;
  import bdl_pkg::*;
  localparam int K = 64;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [K-1:0] av, bv, cv, cz, zz;
  initial begin av = {$urandom, $urandom}; bv = {$urandom, $urandom}; cv = {$urandom, $urandom}; end

  token_t a, b, ci, c, z;
  logic at, bt, cit, ct, zt;
  int sa, sb, sc, gc, gz, tc, tz;
  tb_src_lane  #(.K(K)) u_sa (.clk, .rst_n, .bits(av), .take(at), .hold(1'b0), .tok(a), .sent(sa));
  tb_src_lane  #(.K(K)) u_sb (.clk, .rst_n, .bits(bv), .take(bt), .hold(1'b0), .tok(b), .sent(sb));
  tb_src_lane  #(.K(K)) u_sc (.clk, .rst_n, .bits(cv), .take(cit), .hold(1'b0), .tok(ci), .sent(sc));
  tb_sink_lane #(.K(K)) u_kc (.clk, .rst_n, .tok(c), .hold(1'b0), .cycle, .take(ct), .bits(cz), .got(gc), .t_last(tc));
  tb_sink_lane #(.K(K)) u_kz (.clk, .rst_n, .tok(z), .hold(1'b0), .cycle, .take(zt), .bits(zz), .got(gz), .t_last(tz));
  bdl_full_adder u_dut (.clk, .rst_n, .a_i(a), .a_take(at), .b_i(b), .b_take(bt), .ci_i(ci), .ci_take(cit),
                        .co_o(c), .co_take(ct), .z_o(z), .z_take(zt));

  int t0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t0 = cycle;
    while (gz < K || gc < K) @(posedge clk);
    for (int k = 0; k < K; k++) begin
      checks += 2;
      if (cz[k] !== ((av[k] & bv[k]) | (av[k] & cv[k]) | (bv[k] & cv[k]))) begin failures++; $display("FAIL carry %0d", k); end
      if (zz[k] !== (av[k] ^ bv[k] ^ cv[k])) begin failures++; $display("FAIL sum %0d", k); end
    end
    checks++;
    if (tz - t0 > 2 * K + 2) begin failures++; $display("FAIL rate: %0d cycles for %0d pairs", tz - t0, K); end
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
