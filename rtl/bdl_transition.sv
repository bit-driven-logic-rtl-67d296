// bdl_transition: the firing rule of one token-net transition (combinational).
//
// Enabling: every output place is empty and every input place is full with a
// token that satisfies its arc label. A "0"/"1" arc needs that color; all
// unmarked inputs must share one color; all inverting inputs must share one
// color, which must be the complement of the unmarked color when both kinds
// are present. The transition's temporary color is the unmarked inputs'
// color, else the complement of the inverting inputs' color, else 1. Each
// output gets 0, 1, the color, or its complement according to its arc.
// `fire` tells the surrounding module to take every input token and put
// out_val into every output place at the next clock edge, so one firing takes
// one clock cycle. Indexing: in_tok[i] belongs to IN_ARC[i], and out_full[o]
// and out_val[o] to OUT_ARC[o], where index 0 is the first element of the
// '{...} pattern given for the parameter (so for out_full = {x.full, y.full},
// y is output 0). These rules follow the transition definition of the
// G-Net model; making the firing synchronous is this design's choice.
module bdl_transition
  import bdl_pkg::*;
#(
  parameter int   NI = 2,
  parameter int   NO = 1,
  parameter arc_t IN_ARC [NI] = '{default: ARC_PLAIN},
  parameter arc_t OUT_ARC[NO] = '{default: ARC_PLAIN}
) (
  input  token_t          in_tok  [NI],
  input  logic   [NO-1:0] out_full,
  output logic            fire,
  output logic   [NO-1:0] out_val
);

  logic have_plain, have_inv, plain_c, inv_c, ok, color;

  always_comb begin
    have_plain = 1'b0;
    have_inv   = 1'b0;
    plain_c    = 1'b0;
    inv_c      = 1'b0;
    ok         = (out_full == '0);
    for (int i = 0; i < NI; i++) begin
      if (!in_tok[i].full) ok = 1'b0;
      unique case (IN_ARC[i])
        ARC_ZERO: if (in_tok[i].val != 1'b0) ok = 1'b0;
        ARC_ONE:  if (in_tok[i].val != 1'b1) ok = 1'b0;
        ARC_PLAIN: begin
          if (have_plain && plain_c != in_tok[i].val) ok = 1'b0;
          have_plain = 1'b1;
          plain_c    = in_tok[i].val;
        end
        ARC_INV: begin
          if (have_inv && inv_c != in_tok[i].val) ok = 1'b0;
          have_inv = 1'b1;
          inv_c    = in_tok[i].val;
        end
      endcase
    end
    if (have_plain && have_inv && (plain_c == inv_c)) ok = 1'b0;
    color = have_plain ? plain_c : (have_inv ? !inv_c : 1'b1);
    fire  = ok;
    for (int o = 0; o < NO; o++) begin
      unique case (OUT_ARC[o])
        ARC_ZERO:  out_val[o] = 1'b0;
        ARC_ONE:   out_val[o] = 1'b1;
        ARC_PLAIN: out_val[o] = color;
        ARC_INV:   out_val[o] = !color;
      endcase
    end
  end

endmodule
