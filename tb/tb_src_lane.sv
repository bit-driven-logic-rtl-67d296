// tb_src_lane: test source for one bit lane. It plays the ideal operand
// source of a token net: whenever its place is empty or being emptied it puts
// the next bit of its list (bits[sent]) into the place, unless `hold` asks it
// to wait. After K bits it stops.
module tb_src_lane
  import bdl_pkg::*;
#(
  parameter int K = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] bits,
  input  logic         take,
  input  logic         hold,
  output token_t       tok,
  output int           sent
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tok  <= '0;
      sent <= 0;
    end else if ((take || !tok.full) && sent < K && !hold) begin
      tok  <= '{full: 1'b1, val: bits[sent]};
      sent <= sent + 1;
    end else if (take) begin
      tok.full <= 1'b0;
    end
  end
endmodule
