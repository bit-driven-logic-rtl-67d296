// bdl_add3: three-operand adder Z = A + B + C (N-bit operands, N+2 result
// bits) built from two bit-pipelined ripple-carry adders.
//
// The first adder forms S = A + B (N+1 bits); the second adds C to S. The
// second adder is N+1 bits wide with a B side of N bits, so its top bit adds
// only S_N and the carry. Each bit of S sits in one place between the two
// adders. Both adders have skew 1 and thickness 1, so the pair keeps the
// throughput of one sum every 2 cycles; C is best offered one cycle after A
// and B at each bit position. The composition follows the document; the
// clocked firing is this design's choice.
//
// The top sum bit S_N leaves the first adder in the same firing as S_{N-1}
// but is consumed by the second adder one firing later, an arc across two
// levels. With BALANCE = 1 (default) S_N passes one identity transition, the
// correction the time-normal-form rules prescribe, and the adder keeps one
// sum every 2 cycles; BALANCE = 0 leaves the arc as is and the rate drops to
// one sum every 3 cycles. The inserted transition is this design's reading.
module bdl_add3
  import bdl_pkg::*;
#(
  parameter int N       = 4,
  parameter bit BALANCE = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  token_t         a_i    [N],
  output logic   [N-1:0] a_take,
  input  token_t         b_i    [N],
  output logic   [N-1:0] b_take,
  input  token_t         c_i    [N],
  output logic   [N-1:0] c_take,
  output token_t         z_o    [N+2],
  input  logic   [N+1:0] z_take
);

  token_t       s      [N+1];  // first adder's sum places
  logic [N:0]   s_take;
  token_t       t      [N+1];  // second adder's A side
  logic [N:0]   t_take;

  for (genvar i = 0; i < N; i++) begin : g_pass
    assign t[i]      = s[i];
    assign s_take[i] = t_take[i];
  end

  bdl_chain #(.DEPTH(BALANCE ? 1 : 0)) u_top_shim (
    .clk, .rst_n, .in_i(s[N]), .in_take(s_take[N]), .out_o(t[N]), .out_take(t_take[N])
  );

  bdl_ripple_adder #(.N(N)) u_add_ab (
    .clk, .rst_n,
    .a_i(a_i), .a_take(a_take), .b_i(b_i), .b_take(b_take),
    .z_o(s), .z_take(s_take)
  );

  bdl_ripple_adder #(.N(N + 1), .NB(N)) u_add_sc (
    .clk, .rst_n,
    .a_i(t), .a_take(t_take), .b_i(c_i), .b_take(c_take),
    .z_o(z_o), .z_take(z_take)
  );

endmodule
