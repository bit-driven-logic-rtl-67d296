// tb_bdl_gsla_mul: runs the 4 x 4 array multiplier as a program on a G-SLA
// array enlarged to 216 rows and 80 columns (the default array holds only
// the five-bit adder). The program is derived here from the multiplier's
// token net, the same net as bdl_multiplier:
//   - every a.b cell is one transition with one row per combination of its
//     present inputs (p, a, b, c); each row consumes the inputs and writes
//     p' = p^c^ab, c' = majority(p, c, ab), b' = b and a' = a;
//   - the a' of every level but the last, and the top carry of every level,
//     pass one identity transition (two rows: one per value);
//   - level 0 has no p or c inputs, and only its top cell emits a carry.
// Column map: A bits, B bits, then per level the partial result p'_0..p'_W,
// the carries between cells, the top carry, the b' copies between cells, the
// a' copies before and after their identity transition.
// All 256 products are streamed with ideal sources and sinks; the test checks
// every product and that, as on the hard-wired multiplier, a product leaves
// every 2 cycles.
module tb_bdl_gsla_mul;
  import bdl_pkg::*;
  localparam int W = 4;
  localparam int B_A  = 0;
  localparam int B_B  = B_A + W;
  localparam int B_LP = B_B + W;
  localparam int B_CQ = B_LP + W * (W + 1);
  localparam int B_CM = B_CQ + W * (W - 1);
  localparam int B_BQ = B_CM + W;
  localparam int B_AP = B_BQ + W * (W - 1);
  localparam int B_AQ = B_AP + (W - 1) * W;
  localparam int C    = B_AQ + (W - 1) * W;
  localparam int R    = W * 4 + (W - 1) * (8 + (W - 1) * 16) + 2 * W + 2 * (W - 1) * W;
  localparam int K    = 256;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  function automatic int lp(input int k, input int j); return B_LP + k * (W + 1) + j; endfunction
  function automatic int cq(input int k, input int j); return B_CQ + k * (W - 1) + j; endfunction
  function automatic int bq(input int k, input int j); return B_BQ + k * (W - 1) + j; endfunction
  function automatic int ap(input int k, input int j); return B_AP + k * W + j; endfunction
  function automatic int aq(input int k, input int j); return B_AQ + k * W + j; endfunction
  function automatic gsla_cell_t cin(input bit v);  return v ? GC_IN1 : GC_IN0;  endfunction
  function automatic gsla_cell_t cout(input bit v); return v ? GC_OUTS : GC_OUTR; endfunction

  gsla_cell_t prog [R][C];
  token_t     init [C];
  int         rows_used;

  initial begin
    int r;
    for (int i = 0; i < R; i++) for (int c = 0; c < C; c++) prog[i][c] = GC_EMPTY;
    for (int c = 0; c < C; c++) init[c] = '0;
    r = 0;
    for (int k = 0; k < W; k++) begin
      for (int j = 0; j < W; j++) begin
        // columns of this cell's inputs (-1: absent) and outputs
        int ca, cb, cp, cc, op, oc, ob, oa;
        ca = (k == 0) ? B_A + j : aq(k - 1, j);
        cb = (j == 0) ? B_B + k : bq(k, j - 1);
        cp = (k == 0) ? -1 : lp(k - 1, j + 1);
        cc = (k == 0 || j == 0) ? -1 : cq(k, j - 1);
        op = lp(k, j);
        oc = (k == 0 && j != W - 1) ? -1 : ((j == W - 1) ? B_CM + k : cq(k, j));
        ob = (j == W - 1) ? -1 : bq(k, j);
        oa = (k == W - 1) ? -1 : ap(k, j);
        for (int v = 0; v < 16; v++) begin
          bit pv, av, bv, cv, ab;
          av = v[0]; bv = v[1]; pv = v[2]; cv = v[3];
          if ((cp < 0 && pv) || (cc < 0 && cv)) continue;
          ab = av & bv;
          prog[r][ca] = cin(av);
          prog[r][cb] = cin(bv);
          if (cp >= 0) prog[r][cp] = cin(pv);
          if (cc >= 0) prog[r][cc] = cin(cv);
          prog[r][op] = cout(pv ^ cv ^ ab);
          if (oc >= 0) prog[r][oc] = cout((pv & cv) | (pv & ab) | (cv & ab));
          if (ob >= 0) prog[r][ob] = cout(bv);
          if (oa >= 0) prog[r][oa] = cout(av);
          r++;
        end
      end
      // identity transitions: top carry -> p'_W, and a' -> next level
      for (int v = 0; v < 2; v++) begin
        prog[r][B_CM + k] = cin(v[0]); prog[r][lp(k, W)] = cout(v[0]); r++;
        if (k < W - 1)
          for (int j = 0; j < W; j++) begin
            prog[r][ap(k, j)] = cin(v[0]); prog[r][aq(k, j)] = cout(v[0]); r++;
          end
      end
    end
    rows_used = r;
  end

  // product bit j: z_k = p'_0 of level k (k < W-1), then p'_0..p'_W of the last level
  function automatic int zcol(input int j);
    return (j < W - 1) ? lp(j, 0) : lp(W - 1, j - (W - 1));
  endfunction

  token_t        col [C];
  logic [C-1:0]  put, put_val, take;
  logic [R-1:0]  fired;
  int            sa [W], sb [W], got [2*W];
  logic [2*W-1:0] prod [K];
  int            t_done [K];

  bdl_gsla #(.R(R), .C(C)) u_dut (.clk, .rst_n, .prog_i(prog), .init_i(init), .put, .put_val, .take,
                                  .col_o(col), .fired_o(fired));

  // operand k: A = k mod 16, B = k / 16
  always_comb begin
    put = '0; put_val = '0; take = '0;
    for (int i = 0; i < W; i++) begin
      if (!col[B_A + i].full && sa[i] < K) begin put[B_A + i] = 1'b1; put_val[B_A + i] = sa[i][i]; end
      if (!col[B_B + i].full && sb[i] < K) begin put[B_B + i] = 1'b1; put_val[B_B + i] = sb[i][W + i]; end
    end
    for (int j = 0; j < 2 * W; j++) take[zcol(j)] = col[zcol(j)].full;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) begin sa[i] <= 0; sb[i] <= 0; end
      for (int j = 0; j < 2 * W; j++) got[j] <= 0;
    end else begin
      for (int i = 0; i < W; i++) begin
        if (put[B_A + i]) sa[i] <= sa[i] + 1;
        if (put[B_B + i]) sb[i] <= sb[i] + 1;
      end
      for (int j = 0; j < 2 * W; j++)
        if (take[zcol(j)]) begin
          prod[got[j]][j] <= col[zcol(j)].val;
          got[j] <= got[j] + 1;
          if (j == 2 * W - 1) t_done[got[j]] <= cycle;
        end
    end
  end

  function automatic bit done();
    for (int j = 0; j < 2 * W; j++) if (got[j] < K) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    checks++;
    if (rows_used != R) begin failures++; $display("FAIL program has %0d rows, array %0d", rows_used, R); end
    rst_n = 1'b1;
    while (!done()) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int k = 0; k < K; k++) begin
      checks++;
      if (prod[k] != (2*W)'((k % 16) * (k / 16))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d gave %0d", k % 16, k / 16, prod[k]);
      end
    end
    for (int k = 2 * W; k < K - 1; k++) begin
      checks++;
      if (t_done[k+1] - t_done[k] != 2) begin
        failures++;
        if (failures < 10) $display("FAIL rate at product %0d: %0d cycles", k, t_done[k+1] - t_done[k]);
      end
    end
    $display("G-SLA multiplier: %0d rows x %0d columns, %0d products in %0d cycles", R, C, K, t_done[K-1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
