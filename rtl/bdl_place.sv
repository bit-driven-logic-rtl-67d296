// bdl_place: one place of a token net, i.e. one tristable storage column
// (states E, 0, 1).
//
// A transition that fires puts a token into the place (put/put_val) or takes
// the token out (take); both act at the clock edge that ends the firing. The
// strict firing rule means a token is only put into an empty place and only
// taken from a full one, so put and take never coincide; assertions check
// this. Reset loads the initial marking: empty by default, or a 0/1 token
// (INIT_FULL/INIT_VAL), as a circled initial value does on power-up.
module bdl_place
  import bdl_pkg::*;
#(
  parameter bit INIT_FULL = 1'b0,
  parameter bit INIT_VAL  = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   put,
  input  logic   put_val,
  input  logic   take,
  output token_t tok
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tok.full <= INIT_FULL;
      tok.val  <= INIT_VAL;
    end else if (put) begin
      tok.full <= 1'b1;
      tok.val  <= put_val;
    end else if (take) begin
      tok.full <= 1'b0;
    end
  end

  // strict firing rule
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (put)  assert (!tok.full) else $error("token put into a full place");
      if (take) assert (tok.full)  else $error("token taken from an empty place");
    end
  end

endmodule
