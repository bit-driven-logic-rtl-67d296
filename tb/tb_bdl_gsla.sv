// tb_bdl_gsla: programs the G-SLA at its default size (36 rows, 20 columns)
// with a five-bit ripple-carry adder laid out bit after bit, as in the
// horizontal adder program: bit 0 is a half adder of 4 rows, each higher bit
// a full adder of 8 rows, one row per combination of a, b and carry-in. Each
// row consumes its inputs ("0"/"1" cells) and writes the sum and carry
// columns ("r"/"s" cells). Column 4i+0 is a_i, 4i+1 b_i, 4i+2 z_i and 4i+3
// the carry out of bit i; the carry column of bit 4 is the sum's bit 5.
// Streams 200 random operand pairs into the a/b columns, takes the sums from
// the z/carry columns (with random stalls in a second phase), and checks
// every sum, that at most one row of a bit fires per cycle, and that with
// ideal ends a sum completes every 2 cycles. A second program on a 4x4
// array, the switch (a goes to x when the control is 1, to y when it is 0),
// checks routing by the control's color.
module tb_bdl_gsla;
  import bdl_pkg::*;
  localparam int R = 36, C = 20, N = 5, K = 200;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  function automatic gsla_cell_t cin(input bit v);
    return v ? GC_IN1 : GC_IN0;
  endfunction
  function automatic gsla_cell_t cout(input bit v);
    return v ? GC_OUTS : GC_OUTR;
  endfunction

  gsla_cell_t prog [R][C];
  token_t     init [C];
  always_comb begin
    int r;
    for (int i = 0; i < R; i++) for (int c = 0; c < C; c++) prog[i][c] = GC_EMPTY;
    r = 0;
    for (int v = 0; v < 4; v++) begin
      prog[r][0] = cin(v[0]); prog[r][1] = cin(v[1]);
      prog[r][2] = cout(v[0] ^ v[1]); prog[r][3] = cout(v[0] & v[1]);
      r++;
    end
    for (int i = 1; i < N; i++)
      for (int v = 0; v < 8; v++) begin
        prog[r][4*i] = cin(v[0]); prog[r][4*i+1] = cin(v[1]); prog[r][4*(i-1)+3] = cin(v[2]);
        prog[r][4*i+2] = cout(v[0] ^ v[1] ^ v[2]);
        prog[r][4*i+3] = cout((v[0] & v[1]) | (v[0] & v[2]) | (v[1] & v[2]));
        r++;
      end
    for (int c = 0; c < C; c++) init[c] = '0;
  end

  logic [N-1:0] opa [K], opb [K];
  initial for (int k = 0; k < K; k++) begin opa[k] = N'($urandom); opb[k] = N'($urandom); end

  token_t       col [C];
  logic [C-1:0] put, put_val, take;
  logic [R-1:0] fired;
  int           sent [N], got [N+1];
  logic [N:0]   sums [K];
  int           t_done [K];
  logic         stall_phase, hold;

  bdl_gsla u_dut (.clk, .rst_n, .prog_i(prog), .init_i(init), .put, .put_val, .take, .col_o(col), .fired_o(fired));

  always_ff @(posedge clk) hold <= stall_phase && ($urandom_range(0, 2) == 0);

  // environment: fill empty operand columns, empty full result columns
  always_comb begin
    put = '0; put_val = '0; take = '0;
    for (int i = 0; i < N; i++) begin
      if (!col[4*i].full && sent[i] < K) begin
        put[4*i] = 1'b1; put[4*i+1] = 1'b1;
        put_val[4*i] = opa[sent[i]][i]; put_val[4*i+1] = opb[sent[i]][i];
      end
      if (col[4*i+2].full && !hold) take[4*i+2] = 1'b1;
    end
    if (col[4*(N-1)+3].full && !hold) take[4*(N-1)+3] = 1'b1;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) sent[i] <= 0;
      for (int i = 0; i <= N; i++) got[i] <= 0;
    end else begin
      for (int i = 0; i < N; i++) if (put[4*i]) sent[i] <= sent[i] + 1;
      for (int i = 0; i <= N; i++) begin
        int c;
        c = (i < N) ? 4*i+2 : 4*(N-1)+3;
        if (take[c]) begin
          sums[got[i]][i] <= col[c].val;
          got[i] <= got[i] + 1;
          if (i == N) t_done[got[i]] <= cycle;
        end
      end
      for (int i = 1; i < N; i++) begin
        checks++;
        if (!$onehot0(fired[4+8*(i-1) +: 8])) begin failures++; $display("FAIL two rows of bit %0d fired", i); end
      end
    end
  end

  // second program: the switch on its own 4x4 array. Columns a, c, x, y.
  // Transition a->x (control "1") and a->y (control "0") each take two
  // rows, one per color of a.
  localparam int SR = 4, SC = 4, KS = 60;
  gsla_cell_t sprog [SR][SC];
  token_t     sinit [SC], scol [SC];
  logic [SC-1:0] sput, sval, stake;
  logic [SR-1:0] sfired;
  logic [KS-1:0] sw_a, sw_c;
  int         s_sent, s_gx, s_gy;
  logic [KS-1:0] s_x, s_y;
  initial begin sw_a = KS'({$urandom, $urandom}); sw_c = KS'({$urandom, $urandom}); end
  always_comb begin
    for (int v = 0; v < 2; v++) begin
      sprog[v]   = '{cin(v[0]), GC_IN1, cout(v[0]), GC_EMPTY};
      sprog[2+v] = '{cin(v[0]), GC_IN0, GC_EMPTY, cout(v[0])};
    end
    for (int c = 0; c < SC; c++) sinit[c] = '0;
    sput  = '0; sval = '0;
    if (!scol[0].full && !scol[1].full && s_sent < KS) begin
      sput[1:0] = 2'b11; sval[0] = sw_a[s_sent]; sval[1] = sw_c[s_sent];
    end
    stake = {scol[3].full, scol[2].full, 2'b00};
  end
  bdl_gsla #(.R(SR), .C(SC)) u_sw (.clk, .rst_n, .prog_i(sprog), .init_i(sinit), .put(sput), .put_val(sval),
                                   .take(stake), .col_o(scol), .fired_o(sfired));
  always_ff @(posedge clk) begin
    if (!rst_n) begin s_sent <= 0; s_gx <= 0; s_gy <= 0; end
    else begin
      if (sput[0]) s_sent <= s_sent + 1;
      if (stake[2]) begin s_x[s_gx] <= scol[2].val; s_gx <= s_gx + 1; end
      if (stake[3]) begin s_y[s_gy] <= scol[3].val; s_gy <= s_gy + 1; end
    end
  end

  initial begin
    stall_phase = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (got[N] < K / 2) @(posedge clk);
    stall_phase = 1'b1;
    while (got[N] < K) @(posedge clk);
    while (s_gx + s_gy < KS) @(posedge clk);
    repeat (2) @(posedge clk);
    begin
      int nx, ny;
      nx = 0; ny = 0;
      for (int k = 0; k < KS; k++) begin
        checks++;
        if (sw_c[k]) begin
          if (s_x[nx] != sw_a[k]) begin failures++; $display("FAIL switch token %0d to x", k); end
          nx++;
        end else begin
          if (s_y[ny] != sw_a[k]) begin failures++; $display("FAIL switch token %0d to y", k); end
          ny++;
        end
      end
      checks++;
      if (nx != s_gx || ny != s_gy) begin failures++; $display("FAIL switch routed %0d/%0d, expected %0d/%0d", s_gx, s_gy, nx, ny); end
    end
    for (int k = 0; k < K; k++) begin
      checks++;
      if (sums[k] != (N+1)'(opa[k]) + (N+1)'(opb[k])) begin
        failures++; $display("FAIL sum %0d: %0d + %0d gave %0d", k, opa[k], opb[k], sums[k]);
      end
    end
    for (int k = 10; k < K / 2 - 1; k++) begin
      checks++;
      if (t_done[k+1] - t_done[k] != 2) begin failures++; $display("FAIL rate at sum %0d: %0d cycles", k, t_done[k+1] - t_done[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
