// bdl_parallel_chains: two linear chains of N and M places running side by
// side between a fork transition T0 and a join transition T1.
//
// T0 copies each input token into the first place of both chains; T1 waits
// until both chains deliver their copy and puts one token (same color) into
// the output place. Since the two chains always hold the same number of
// tokens, the longer chain limits the pair: the throughput bound is
// M/(M+N) tokens per cycle, 1/2 when the chains are balanced. The structure
// follows the document; M, N defaults and the clocked firing are this
// design's choice.
module bdl_parallel_chains
  import bdl_pkg::*;
#(
  parameter int M = 4,
  parameter int N = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  token_t in_i,
  output logic   in_take,
  output token_t out_o,
  input  logic   out_take
);

  token_t up_head, lo_head, up_tail, lo_tail;
  logic   up_head_take, lo_head_take, up_tail_take, lo_tail_take;

  // T0: fork
  logic       t0_fire;
  logic [1:0] t0_val;
  bdl_transition #(.NI(1), .NO(2)) u_t0 (
    .in_tok('{in_i}), .out_full({up_head.full, lo_head.full}),
    .fire(t0_fire), .out_val(t0_val)
  );
  assign in_take = t0_fire;
  bdl_place u_up_head (.clk, .rst_n, .put(t0_fire), .put_val(t0_val[1]), .take(up_head_take), .tok(up_head));
  bdl_place u_lo_head (.clk, .rst_n, .put(t0_fire), .put_val(t0_val[0]), .take(lo_head_take), .tok(lo_head));

  bdl_chain #(.DEPTH(N - 1)) u_upper (
    .clk, .rst_n, .in_i(up_head), .in_take(up_head_take), .out_o(up_tail), .out_take(up_tail_take)
  );
  bdl_chain #(.DEPTH(M - 1)) u_lower (
    .clk, .rst_n, .in_i(lo_head), .in_take(lo_head_take), .out_o(lo_tail), .out_take(lo_tail_take)
  );

  // T1: join
  logic t1_fire;
  logic t1_val;
  bdl_transition #(.NI(2), .NO(1)) u_t1 (
    .in_tok('{up_tail, lo_tail}), .out_full(out_o.full),
    .fire(t1_fire), .out_val(t1_val)
  );
  assign up_tail_take = t1_fire;
  assign lo_tail_take = t1_fire;
  bdl_place u_out (.clk, .rst_n, .put(t1_fire), .put_val(t1_val), .take(out_take), .tok(out_o));

endmodule
