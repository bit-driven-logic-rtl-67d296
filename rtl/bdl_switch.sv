// bdl_switch: routes a data token a to output x when the control token c is 1
// and to output y when c is 0.
//
// Two transitions share the input places a and c: {a -> x} needs c = 1 and
// {a -> y} needs c = 0; the data token keeps its color. Only one can be
// enabled; it fires in one clock, once a and c are full and its own output is
// empty, and consumes both inputs. Net and arc labels are the document's; the
// clocked firing is this design's choice.
module bdl_switch
  import bdl_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  token_t a_i,
  output logic   a_take,
  input  token_t c_i,
  output logic   c_take,
  output token_t x_o,
  input  logic   x_take,
  output token_t y_o,
  input  logic   y_take
);

  localparam arc_t TO_X[2] = '{ARC_PLAIN, ARC_ONE};
  localparam arc_t TO_Y[2] = '{ARC_PLAIN, ARC_ZERO};

  logic fx, fy, vx, vy;

  bdl_transition #(.NI(2), .NO(1), .IN_ARC(TO_X)) u_tx (
    .in_tok('{a_i, c_i}), .out_full(x_o.full), .fire(fx), .out_val(vx)
  );
  bdl_transition #(.NI(2), .NO(1), .IN_ARC(TO_Y)) u_ty (
    .in_tok('{a_i, c_i}), .out_full(y_o.full), .fire(fy), .out_val(vy)
  );

  assign a_take = fx | fy;
  assign c_take = fx | fy;

  bdl_place u_x (.clk, .rst_n, .put(fx), .put_val(vx), .take(x_take), .tok(x_o));
  bdl_place u_y (.clk, .rst_n, .put(fy), .put_val(vy), .take(y_take), .tok(y_o));

endmodule
