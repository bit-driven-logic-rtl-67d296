// tb_sink_lane: test sink for one bit lane. It removes a token from the place
// as soon as it is full (the ideal sink), unless `hold` asks it to wait, and
// records the bits in arrival order together with the cycle of the last one.
module tb_sink_lane
  import bdl_pkg::*;
#(
  parameter int K = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  token_t       tok,
  input  logic         hold,
  input  int           cycle,
  output logic         take,
  output logic [K-1:0] bits,
  output int           got,
  output int           t_last
);
  assign take = tok.full && !hold;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bits   <= '0;
      got    <= 0;
      t_last <= 0;
    end else if (take) begin
      if (got < K) bits[got] <= tok.val;
      got    <= got + 1;
      t_last <= cycle;
    end
  end
endmodule
