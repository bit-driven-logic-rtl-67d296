// tb_bdl_place: puts and takes tokens of both colors in a place and checks
// the state after each clock, including the initial marking after reset.
module tb_bdl_place;
  import bdl_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic   put, put_val, take;
  token_t tok, tok1;
  bdl_place u_dut (.clk, .rst_n, .put, .put_val, .take, .tok);
  bdl_place #(.INIT_FULL(1'b1), .INIT_VAL(1'b1)) u_init (.clk, .rst_n, .put(1'b0), .put_val(1'b0), .take(take && tok1.full), .tok(tok1));

  task automatic expect_tok(input logic f, input logic v, input string what);
    checks++;
    if (tok.full !== f || (f && tok.val !== v)) begin
      failures++;
      $display("FAIL %s: full=%0d val=%0d", what, tok.full, tok.val);
    end
  endtask

  initial begin
    put = 0; put_val = 0; take = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    expect_tok(0, 0, "after reset");
    checks++;
    if (!(tok1.full && tok1.val)) begin failures++; $display("FAIL initial marking 1"); end
    for (int r = 0; r < 40; r++) begin
      logic v;
      v = 1'($urandom);
      put = 1; put_val = v;
      @(posedge clk); #1;
      put = 0;
      expect_tok(1, v, "after put");
      @(posedge clk); #1;
      expect_tok(1, v, "holds");
      take = 1;
      @(posedge clk); #1;
      take = 0;
      expect_tok(0, 0, "after take");
    end
    checks++;
    if (tok1.full) begin failures++; $display("FAIL initial token not taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
