// tb_bdl_transition: checks the firing rule on the example transition with
// inputs A2, A (unmarked), B (inverting), C ("0"), D ("1") and outputs E
// (unmarked), F (inverting), G ("0"), H ("1"), over every input marking and
// output occupancy, plus a transition with only inverting inputs and one
// with only marked inputs. Expected values are worked out here from the rule.
module tb_bdl_transition;
  import bdl_pkg::*;
  int checks = 0, failures = 0;

  localparam arc_t IA[5] = '{ARC_PLAIN, ARC_PLAIN, ARC_INV, ARC_ZERO, ARC_ONE};
  localparam arc_t OA[4] = '{ARC_PLAIN, ARC_INV, ARC_ZERO, ARC_ONE};
  token_t     tin [5];
  logic [3:0] ofull;
  logic       fire;
  logic [3:0] oval;
  bdl_transition #(.NI(5), .NO(4), .IN_ARC(IA), .OUT_ARC(OA)) u_dut (
    .in_tok(tin), .out_full(ofull), .fire(fire), .out_val(oval)
  );

  localparam arc_t IB[2] = '{ARC_INV, ARC_INV};
  localparam arc_t OB[2] = '{ARC_PLAIN, ARC_INV};
  token_t     tb_in [2];
  logic       fire_b;
  logic [1:0] oval_b;
  bdl_transition #(.NI(2), .NO(2), .IN_ARC(IB), .OUT_ARC(OB)) u_inv (
    .in_tok(tb_in), .out_full(2'b00), .fire(fire_b), .out_val(oval_b)
  );

  localparam arc_t IC[1] = '{ARC_ONE};
  localparam arc_t OC[1] = '{ARC_PLAIN};
  token_t     tc_in [1];
  logic       fire_c;
  logic [0:0] oval_c;
  bdl_transition #(.NI(1), .NO(1), .IN_ARC(IC), .OUT_ARC(OC)) u_mark (
    .in_tok(tc_in), .out_full(1'b0), .fire(fire_c), .out_val(oval_c)
  );

  initial begin
    for (int full = 0; full < 32; full++)
      for (int val = 0; val < 32; val++)
        for (int of = 0; of < 16; of++) begin
          logic en, a2, a, b, c, d;
          for (int i = 0; i < 5; i++) tin[i] = '{full: full[i], val: val[i]};
          ofull = 4'(of);
          {d, c, b, a, a2} = 5'(val);
          en = (full == 31) && (of == 0) && !c && d && (a2 == a) && (b == !a);
          #1;
          checks++;
          if (fire !== en) begin
            failures++;
            if (failures < 10) $display("FAIL fire=%0d expected %0d (full=%b val=%b of=%b)", fire, en, full[4:0], val[4:0], of[3:0]);
          end
          if (en) begin
            checks++;
            // E = color (A), F = not A, G = 0, H = 1
            if (oval !== {1'b1, 1'b0, !a, a}) begin
              failures++;
              $display("FAIL outputs %b for A=%0d", oval, a);
            end
          end
        end
    for (int v = 0; v < 4; v++) begin
      tb_in[0] = '{full: 1'b1, val: v[0]};
      tb_in[1] = '{full: 1'b1, val: v[1]};
      #1;
      checks++;
      if (fire_b !== (v[0] == v[1]) || (fire_b && oval_b !== {v[0], !v[0]})) begin
        failures++;
        $display("FAIL inverting-only transition v=%0d fire=%0d out=%b", v, fire_b, oval_b);
      end
    end
    for (int v = 0; v < 2; v++) begin
      tc_in[0] = '{full: 1'b1, val: v[0]};
      #1;
      checks++;
      if (fire_c !== v[0] || (fire_c && oval_c !== 1'b1)) begin
        failures++;
        $display("FAIL marked-only transition v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
