// bdl_ripple_adder: N-bit bit-level-pipelined ripple-carry adder, Z = A + B
// with N+1 result bits.
//
// Bit 0 is an H-ADD operator on a0, b0; bit i (0 < i < NB) is an ADD operator
// on a_i, b_i and the carry place of bit i-1; the carry place of bit N-1 is the
// result bit z_N. Every operand and result bit is its own token place, so bits
// of successive additions flow independently: while bit i works on one
// operand pair, bit i-1 is already working on the next one. Once the carry of
// the first pair reaches the top bit, odd and even bit positions fire in
// alternate cycles and a new sum leaves every 2 cycles, whatever N is.
// Latency: result bit i of an operand pair appears i+1 cycles after its bit 0
// entered when operand bits arrive with skew 1 (bit i one cycle after bit i-1).
//
// NB (this design's addition, default N) is the width of B: bit positions
// NB..N-1 add only the incoming carry with an H-ADD, which the three-operand
// adder needs for its (N+1)-bit second stage. The adder structure follows the
// document; the clocked firing is this design's choice.
module bdl_ripple_adder
  import bdl_pkg::*;
#(
  parameter int N  = 64,
  parameter int NB = N
) (
  input  logic            clk,
  input  logic            rst_n,
  input  token_t          a_i    [N],
  output logic   [N-1:0]  a_take,
  input  token_t          b_i    [NB],
  output logic   [NB-1:0] b_take,
  output token_t          z_o    [N+1],
  input  logic   [N:0]    z_take
);

  token_t       car      [N-1];  // carry place owned by bit i < N-1
  logic [N-2:0] car_take;

  for (genvar i = 0; i < N; i++) begin : g_bit
    token_t co;
    logic   co_take;

    if (i == N - 1) begin : g_top
      assign z_o[N]  = co;
      assign co_take = z_take[N];
    end else begin : g_mid
      assign co_take = car_take[i];
      assign car[i]  = co;
    end

    if (i == 0) begin : g_ha0
      bdl_half_adder u_add (
        .clk, .rst_n,
        .a_i(a_i[0]), .a_take(a_take[0]),
        .b_i(b_i[0]), .b_take(b_take[0]),
        .c_o(co), .c_take(co_take),
        .z_o(z_o[0]), .z_take(z_take[0])
      );
    end else if (i < NB) begin : g_fa
      bdl_full_adder u_add (
        .clk, .rst_n,
        .a_i(a_i[i]), .a_take(a_take[i]),
        .b_i(b_i[i]), .b_take(b_take[i]),
        .ci_i(car[i-1]), .ci_take(car_take[i-1]),
        .co_o(co), .co_take(co_take),
        .z_o(z_o[i]), .z_take(z_take[i])
      );
    end else begin : g_hac
      bdl_half_adder u_add (
        .clk, .rst_n,
        .a_i(a_i[i]), .a_take(a_take[i]),
        .b_i(car[i-1]), .b_take(car_take[i-1]),
        .c_o(co), .c_take(co_take),
        .z_o(z_o[i]), .z_take(z_take[i])
      );
    end
  end

endmodule
