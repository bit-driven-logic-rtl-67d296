// tb_bdl_top: end-to-end test of every design in bdl_top at its default
// size (4x4 multiplier, 64-bit adder, 4-bit three-operand adder, 3-bit gate,
// switch, 3-bit parallel-to-serial converter, 7-place chain, parallel
// chains, flat and skewed shims, G-SLA array programmed as a five-bit adder). Each design gets a stream of random or
// exhaustive operands from ideal or stalling sources and sinks, and every
// result is checked against a value computed here. It also counts how often
// each mechanism of the designs happened and fails if one never did:
// several operand sets in flight at once (bit-level pipelining), a result
// every 2 cycles, back-pressure from a stalled sink, a gate holding data
// until its control token, both routes of the switch, out-of-order bits in
// the parallel-to-serial converter, the shim delays, and rows of the G-SLA
// firing on their own tests.
module tb_bdl_top;
  import bdl_pkg::*;
  localparam int MW = 4, AN = 64, A3 = 4, GW = 3, PW = 3, FW = 4, SW = 3;
  localparam int KM = 256, KA = 40, K3 = 100, KG = 20, KS = 100, KP = 40, KC = 50;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cycle = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  // ---------------- stimulus ----------------
  logic [KM-1:0] mabits [MW], mbbits [MW];
  logic [AN-1:0] aa [KA], ab [KA];
  logic [KA-1:0] aabits [AN], abbits [AN];
  logic [A3-1:0] ta [K3], tbv [K3], tc [K3];
  logic [K3-1:0] tabits [A3], tbbits [A3], tcbits [A3];
  logic [KG-1:0] gbits [GW];
  logic [KS-1:0] sav, scv;
  logic [KP-1:0] pbits [PW];
  logic [KC-1:0] cbits, parbits;
  logic [KC-1:0] fbits [FW], kbits [SW];

  initial begin
    for (int k = 0; k < KA; k++) begin aa[k] = {$urandom, $urandom}; ab[k] = {$urandom, $urandom}; end
    aa[0] = '1; ab[0] = 1;
    for (int k = 0; k < K3; k++) begin ta[k] = A3'($urandom); tbv[k] = A3'($urandom); tc[k] = A3'($urandom); end
    for (int i = 0; i < GW; i++) gbits[i] = KG'($urandom);
    for (int k = 0; k < KS; k++) begin sav[k] = 1'($urandom); scv[k] = 1'($urandom); end
    for (int i = 0; i < PW; i++) pbits[i] = KP'({$urandom, $urandom});
    cbits = KC'({$urandom, $urandom}); parbits = KC'({$urandom, $urandom});
    for (int i = 0; i < FW; i++) fbits[i] = KC'({$urandom, $urandom});
    for (int i = 0; i < SW; i++) kbits[i] = KC'({$urandom, $urandom});
  end
  always_comb begin
    for (int k = 0; k < KM; k++) for (int i = 0; i < MW; i++) begin mabits[i][k] = k[i]; mbbits[i][k] = k[MW+i]; end
    for (int k = 0; k < KA; k++) for (int i = 0; i < AN; i++) begin aabits[i][k] = aa[k][i]; abbits[i][k] = ab[k][i]; end
    for (int k = 0; k < K3; k++) for (int i = 0; i < A3; i++) begin
      tabits[i][k] = ta[k][i]; tbbits[i][k] = tbv[k][i]; tcbits[i][k] = tc[k][i];
    end
  end

  logic hold_a, hold_z, hold_gc, hold_s, hold_p [PW];
  always_ff @(posedge clk) begin
    hold_a  <= ($urandom_range(0, 3) == 0);
    hold_z  <= ($urandom_range(0, 2) == 0);
    hold_gc <= (cycle < 40) || ($urandom_range(0, 3) != 0);
    hold_s  <= ($urandom_range(0, 3) == 0);
    for (int i = 0; i < PW; i++) hold_p[i] <= ($urandom_range(0, 2) == 0);
  end

  // ---------------- DUT ports ----------------
  token_t mul_a [MW], mul_b [MW], mul_z [2*MW];
  logic [MW-1:0] mul_at, mul_bt;  logic [2*MW-1:0] mul_zt;
  token_t add_a [AN], add_b [AN], add_z [AN+1];
  logic [AN-1:0] add_at, add_bt;  logic [AN:0] add_zt;
  token_t a3_a [A3], a3_b [A3], a3_c [A3], a3_z [A3+2];
  logic [A3-1:0] a3_at, a3_bt, a3_ct;  logic [A3+1:0] a3_zt;
  token_t g_a [GW], g_c, g_z [GW];
  logic [GW-1:0] g_at, g_zt;  logic g_ct;
  token_t s_a, s_c, s_x, s_y;
  logic s_at, s_ct, s_xt, s_yt;
  token_t p_a [PW], p_z;
  logic [PW-1:0] p_at;  logic p_zt;
  token_t ch_in, ch_out, pc_in, pc_out;
  logic ch_it, ch_ot, pc_it, pc_ot;
  token_t f_in [FW], f_out [FW], k_in [SW], k_out [SW];
  logic [FW-1:0] f_it, f_ot;  logic [SW-1:0] k_it, k_ot;

  // G-SLA: five-bit ripple adder program. Column 4i is a_i, 4i+1 b_i, 4i+2
  // z_i, 4i+3 the carry out of bit i (the last one is sum bit 5). Bit 0 has
  // one row per (a, b), higher bits one row per (a, b, carry in).
  localparam int GR = 36, GC = 20, GN = 5, KGS = 40;
  gsla_cell_t   gprog [GR][GC];
  token_t       ginit [GC], gcol [GC];
  logic [GC-1:0] gput, gpval, gtake;
  logic [GR-1:0] gfired;
  function automatic gsla_cell_t g_in(input bit v);
    return v ? GC_IN1 : GC_IN0;
  endfunction
  function automatic gsla_cell_t g_out(input bit v);
    return v ? GC_OUTS : GC_OUTR;
  endfunction
  always_comb begin
    int r;
    for (int i = 0; i < GR; i++) for (int c = 0; c < GC; c++) gprog[i][c] = GC_EMPTY;
    r = 0;
    for (int v = 0; v < 4; v++) begin
      gprog[r][0] = g_in(v[0]); gprog[r][1] = g_in(v[1]);
      gprog[r][2] = g_out(v[0] ^ v[1]); gprog[r][3] = g_out(v[0] & v[1]);
      r++;
    end
    for (int i = 1; i < GN; i++)
      for (int v = 0; v < 8; v++) begin
        gprog[r][4*i] = g_in(v[0]); gprog[r][4*i+1] = g_in(v[1]); gprog[r][4*(i-1)+3] = g_in(v[2]);
        gprog[r][4*i+2] = g_out(v[0] ^ v[1] ^ v[2]);
        gprog[r][4*i+3] = g_out((v[0] & v[1]) | (v[0] & v[2]) | (v[1] & v[2]));
        r++;
      end
    for (int c = 0; c < GC; c++) ginit[c] = '0;
  end
  logic [GN-1:0] gopa [KGS], gopb [KGS];
  logic [GN:0]   gsum [KGS];
  int            gsent [GN], ggot [GN+1];
  initial for (int k = 0; k < KGS; k++) begin gopa[k] = GN'($urandom); gopb[k] = GN'($urandom); end
  always_comb begin
    gput = '0; gpval = '0; gtake = '0;
    for (int i = 0; i < GN; i++) begin
      if (!gcol[4*i].full && gsent[i] < KGS) begin
        gput[4*i] = 1'b1; gput[4*i+1] = 1'b1;
        gpval[4*i] = gopa[gsent[i]][i]; gpval[4*i+1] = gopb[gsent[i]][i];
      end
      gtake[4*i+2] = gcol[4*i+2].full;
    end
    gtake[4*(GN-1)+3] = gcol[4*(GN-1)+3].full;
  end
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < GN; i++) gsent[i] <= 0;
      for (int i = 0; i <= GN; i++) ggot[i] <= 0;
    end else begin
      for (int i = 0; i < GN; i++) if (gput[4*i]) gsent[i] <= gsent[i] + 1;
      for (int i = 0; i <= GN; i++) begin
        int c;
        c = (i < GN) ? 4*i+2 : 4*(GN-1)+3;
        if (gtake[c]) begin gsum[ggot[i]][i] <= gcol[c].val; ggot[i] <= ggot[i] + 1; end
      end
    end
  end

  bdl_top u_top (
    .clk, .rst_n,
    .mul_a_i(mul_a), .mul_a_take(mul_at), .mul_b_i(mul_b), .mul_b_take(mul_bt), .mul_z_o(mul_z), .mul_z_take(mul_zt),
    .add_a_i(add_a), .add_a_take(add_at), .add_b_i(add_b), .add_b_take(add_bt), .add_z_o(add_z), .add_z_take(add_zt),
    .add3_a_i(a3_a), .add3_a_take(a3_at), .add3_b_i(a3_b), .add3_b_take(a3_bt), .add3_c_i(a3_c), .add3_c_take(a3_ct),
    .add3_z_o(a3_z), .add3_z_take(a3_zt),
    .gate_a_i(g_a), .gate_a_take(g_at), .gate_c_i(g_c), .gate_c_take(g_ct), .gate_z_o(g_z), .gate_z_take(g_zt),
    .sw_a_i(s_a), .sw_a_take(s_at), .sw_c_i(s_c), .sw_c_take(s_ct), .sw_x_o(s_x), .sw_x_take(s_xt), .sw_y_o(s_y), .sw_y_take(s_yt),
    .p2s_a_i(p_a), .p2s_a_take(p_at), .p2s_z_o(p_z), .p2s_z_take(p_zt),
    .ch_i(ch_in), .ch_take(ch_it), .ch_o(ch_out), .ch_otake(ch_ot),
    .par_i(pc_in), .par_take(pc_it), .par_o(pc_out), .par_otake(pc_ot),
    .flat_i(f_in), .flat_take(f_it), .flat_o(f_out), .flat_otake(f_ot),
    .skew_i(k_in), .skew_take(k_it), .skew_o(k_out), .skew_otake(k_ot),
    .gsla_prog_i(gprog), .gsla_init_i(ginit), .gsla_put(gput), .gsla_put_val(gpval), .gsla_take(gtake),
    .gsla_col_o(gcol), .gsla_fired_o(gfired)
  );

  // ---------------- sources and sinks ----------------
  // multiplier: ideal ends (checks the rate)
  int ms_a [MW], ms_b [MW], mg [2*MW], mtl [2*MW];
  logic [KM-1:0] mz [2*MW];
  for (genvar i = 0; i < MW; i++) begin : g_ms
    tb_src_lane #(.K(KM)) u_a (.clk, .rst_n, .bits(mabits[i]), .take(mul_at[i]), .hold(1'b0), .tok(mul_a[i]), .sent(ms_a[i]));
    tb_src_lane #(.K(KM)) u_b (.clk, .rst_n, .bits(mbbits[i]), .take(mul_bt[i]), .hold(1'b0), .tok(mul_b[i]), .sent(ms_b[i]));
  end
  for (genvar j = 0; j < 2 * MW; j++) begin : g_mz
    tb_sink_lane #(.K(KM)) u_z (.clk, .rst_n, .tok(mul_z[j]), .hold(1'b0), .cycle, .take(mul_zt[j]), .bits(mz[j]), .got(mg[j]), .t_last(mtl[j]));
  end
  // 64-bit adder: stalling ends
  int as_a [AN], as_b [AN], ag [AN+1], atl [AN+1];
  logic [KA-1:0] az [AN+1];
  for (genvar i = 0; i < AN; i++) begin : g_as
    tb_src_lane #(.K(KA)) u_a (.clk, .rst_n, .bits(aabits[i]), .take(add_at[i]), .hold(hold_a), .tok(add_a[i]), .sent(as_a[i]));
    tb_src_lane #(.K(KA)) u_b (.clk, .rst_n, .bits(abbits[i]), .take(add_bt[i]), .hold(hold_a), .tok(add_b[i]), .sent(as_b[i]));
  end
  for (genvar j = 0; j <= AN; j++) begin : g_az
    tb_sink_lane #(.K(KA)) u_z (.clk, .rst_n, .tok(add_z[j]), .hold(hold_z), .cycle, .take(add_zt[j]), .bits(az[j]), .got(ag[j]), .t_last(atl[j]));
  end
  // three-operand adder: stalling sink
  int ts_a [A3], ts_b [A3], ts_c [A3], tg [A3+2], ttl [A3+2];
  logic [K3-1:0] tz [A3+2];
  for (genvar i = 0; i < A3; i++) begin : g_ts
    tb_src_lane #(.K(K3)) u_a (.clk, .rst_n, .bits(tabits[i]), .take(a3_at[i]), .hold(1'b0), .tok(a3_a[i]), .sent(ts_a[i]));
    tb_src_lane #(.K(K3)) u_b (.clk, .rst_n, .bits(tbbits[i]), .take(a3_bt[i]), .hold(1'b0), .tok(a3_b[i]), .sent(ts_b[i]));
    tb_src_lane #(.K(K3)) u_c (.clk, .rst_n, .bits(tcbits[i]), .take(a3_ct[i]), .hold(1'b0), .tok(a3_c[i]), .sent(ts_c[i]));
  end
  for (genvar j = 0; j < A3 + 2; j++) begin : g_tz
    tb_sink_lane #(.K(K3)) u_z (.clk, .rst_n, .tok(a3_z[j]), .hold(hold_z), .cycle, .take(a3_zt[j]), .bits(tz[j]), .got(tg[j]), .t_last(ttl[j]));
  end
  // gate
  int gs [GW], gg [GW], gtl [GW], gcs;
  logic [KG-1:0] gz [GW];
  for (genvar i = 0; i < GW; i++) begin : g_g
    tb_src_lane  #(.K(KG)) u_a (.clk, .rst_n, .bits(gbits[i]), .take(g_at[i]), .hold(1'b0), .tok(g_a[i]), .sent(gs[i]));
    tb_sink_lane #(.K(KG)) u_z (.clk, .rst_n, .tok(g_z[i]), .hold(1'b0), .cycle, .take(g_zt[i]), .bits(gz[i]), .got(gg[i]), .t_last(gtl[i]));
  end
  tb_src_lane #(.K(KG)) u_gc (.clk, .rst_n, .bits('1), .take(g_ct), .hold(hold_gc), .tok(g_c), .sent(gcs));
  // switch
  int ss_a, ss_c, sgx, sgy, stx, sty;
  logic [KS-1:0] sx, sy;
  tb_src_lane  #(.K(KS)) u_sa (.clk, .rst_n, .bits(sav), .take(s_at), .hold(hold_s), .tok(s_a), .sent(ss_a));
  tb_src_lane  #(.K(KS)) u_sc (.clk, .rst_n, .bits(scv), .take(s_ct), .hold(1'b0), .tok(s_c), .sent(ss_c));
  tb_sink_lane #(.K(KS)) u_sx (.clk, .rst_n, .tok(s_x), .hold(hold_z), .cycle, .take(s_xt), .bits(sx), .got(sgx), .t_last(stx));
  tb_sink_lane #(.K(KS)) u_sy (.clk, .rst_n, .tok(s_y), .hold(1'b0), .cycle, .take(s_yt), .bits(sy), .got(sgy), .t_last(sty));
  // parallel-to-serial: bits arrive at independent random times
  int ps [PW], pg, ptl;
  logic [PW*KP-1:0] pz;
  for (genvar i = 0; i < PW; i++) begin : g_p
    tb_src_lane #(.K(KP)) u_a (.clk, .rst_n, .bits(pbits[i]), .take(p_at[i]), .hold(hold_p[i]), .tok(p_a[i]), .sent(ps[i]));
  end
  tb_sink_lane #(.K(PW*KP)) u_pz (.clk, .rst_n, .tok(p_z), .hold(1'b0), .cycle, .take(p_zt), .bits(pz), .got(pg), .t_last(ptl));
  // chain and parallel chains
  int cs, cg, ctl, qs, qg, qtl;
  logic [KC-1:0] cz, qz;
  tb_src_lane  #(.K(KC)) u_cs (.clk, .rst_n, .bits(cbits), .take(ch_it), .hold(1'b0), .tok(ch_in), .sent(cs));
  tb_sink_lane #(.K(KC)) u_cz (.clk, .rst_n, .tok(ch_out), .hold(1'b0), .cycle, .take(ch_ot), .bits(cz), .got(cg), .t_last(ctl));
  tb_src_lane  #(.K(KC)) u_qs (.clk, .rst_n, .bits(parbits), .take(pc_it), .hold(1'b0), .tok(pc_in), .sent(qs));
  tb_sink_lane #(.K(KC)) u_qz (.clk, .rst_n, .tok(pc_out), .hold(1'b0), .cycle, .take(pc_ot), .bits(qz), .got(qg), .t_last(qtl));
  // shims
  int fs [FW], fg [FW], ftl [FW], ks [SW], kg [SW], ktl [SW];
  logic [KC-1:0] fz [FW], kz [SW];
  int f_t0 [FW], f_t1 [FW], k_t0 [SW], k_t1 [SW];
  for (genvar i = 0; i < FW; i++) begin : g_f
    tb_src_lane  #(.K(KC)) u_a (.clk, .rst_n, .bits(fbits[i]), .take(f_it[i]), .hold(1'b0), .tok(f_in[i]), .sent(fs[i]));
    tb_sink_lane #(.K(KC)) u_z (.clk, .rst_n, .tok(f_out[i]), .hold(1'b0), .cycle, .take(f_ot[i]), .bits(fz[i]), .got(fg[i]), .t_last(ftl[i]));
    always_ff @(posedge clk)
      if (!rst_n) begin f_t0[i] <= -1; f_t1[i] <= -1; end
      else begin
        if (f_in[i].full && f_t0[i] < 0) f_t0[i] <= cycle;
        if (f_out[i].full && f_t1[i] < 0) f_t1[i] <= cycle;
      end
  end
  for (genvar i = 0; i < SW; i++) begin : g_k
    tb_src_lane  #(.K(KC)) u_a (.clk, .rst_n, .bits(kbits[i]), .take(k_it[i]), .hold(1'b0), .tok(k_in[i]), .sent(ks[i]));
    tb_sink_lane #(.K(KC)) u_z (.clk, .rst_n, .tok(k_out[i]), .hold(1'b0), .cycle, .take(k_ot[i]), .bits(kz[i]), .got(kg[i]), .t_last(ktl[i]));
    always_ff @(posedge clk)
      if (!rst_n) begin k_t0[i] <= -1; k_t1[i] <= -1; end
      else begin
        if (k_in[i].full && k_t0[i] < 0) k_t0[i] <= cycle;
        if (k_out[i].full && k_t1[i] < 0) k_t1[i] <= cycle;
      end
  end

  // ---------------- mechanism counters ----------------
  int n_gsla_rows;
  int n_mul_overlap, n_add_overlap, n_backpressure, n_gate_hold, n_sw_x, n_sw_y, n_p2s_ooo;
  int mt [KM];  // arrival cycle of z_{2W-1} of each product
  int ms_min, mg_min;
  always_comb begin
    ms_min = ms_a[0]; mg_min = mg[0];
    for (int i = 0; i < MW; i++) begin if (ms_a[i] < ms_min) ms_min = ms_a[i]; if (ms_b[i] < ms_min) ms_min = ms_b[i]; end
    for (int j = 0; j < 2 * MW; j++) if (mg[j] < mg_min) mg_min = mg[j];
  end
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_mul_overlap <= 0; n_add_overlap <= 0; n_backpressure <= 0; n_gate_hold <= 0;
      n_sw_x <= 0; n_sw_y <= 0; n_p2s_ooo <= 0; n_gsla_rows <= 0;
    end else begin
      // operand sets whose every bit has entered but whose result has not fully left
      if (ms_min - mg_min >= 3) n_mul_overlap <= n_mul_overlap + 1;
      // LSBs of sum k+3 entered before the MSB of sum k left (carry ripple overlap)
      if (as_a[0] - ag[AN] >= 3) n_add_overlap <= n_add_overlap + 1;
      if (hold_z && add_z[AN].full) n_backpressure <= n_backpressure + 1;
      if (g_a[0].full && !g_c.full && gg[0] == gcs) n_gate_hold <= n_gate_hold + 1;
      if (gfired[GR-1:4] != '0 && gfired[3:0] != '0) n_gsla_rows <= n_gsla_rows + 1;
      if (s_xt) n_sw_x <= n_sw_x + 1;
      if (s_yt) n_sw_y <= n_sw_y + 1;
      for (int i = 0; i < PW; i++)
        if (i != pg % PW && p_a[i].full && !p_a[pg % PW].full) n_p2s_ooo <= n_p2s_ooo + 1;
      if (mul_zt[2*MW-1] && mg[2*MW-1] < KM) mt[mg[2*MW-1]] <= cycle;
    end
  end

  // ---------------- checking ----------------
  function automatic bit done();
    for (int j = 0; j < 2 * MW; j++) if (mg[j] < KM) return 0;
    for (int j = 0; j <= AN; j++) if (ag[j] < KA) return 0;
    for (int j = 0; j < A3 + 2; j++) if (tg[j] < K3) return 0;
    for (int j = 0; j < GW; j++) if (gg[j] < KG) return 0;
    if (ggot[GN] < KGS) return 0;
    if (sgx + sgy < KS || pg < PW * KP || cg < KC || qg < KC) return 0;
    for (int j = 0; j < FW; j++) if (fg[j] < KC) return 0;
    for (int j = 0; j < SW; j++) if (kg[j] < KC) return 0;
    return 1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic mechanism(input int n, input string what);
    $display("  %-40s %0d", what, n);
    check(n > 0, {what, " never happened"});
  endtask

  initial begin
    int nx, ny;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!done()) @(posedge clk);
    repeat (3) @(posedge clk);
    for (int k = 0; k < KM; k++) begin
      logic [2*MW-1:0] z;
      for (int j = 0; j < 2 * MW; j++) z[j] = mz[j][k];
      check(z == (2*MW)'((k % 16) * (k / 16)), $sformatf("product %0d * %0d = %0d", k % 16, k / 16, z));
    end
    for (int k = 2 * MW; k < KM - 1; k++) check(mt[k+1] - mt[k] == 2, $sformatf("multiplier rate at product %0d", k));
    for (int k = 0; k < KA; k++) begin
      logic [AN:0] z;
      for (int j = 0; j <= AN; j++) z[j] = az[j][k];
      check(z == {1'b0, aa[k]} + {1'b0, ab[k]}, $sformatf("64-bit sum %0d", k));
    end
    for (int k = 0; k < K3; k++) begin
      logic [A3+1:0] z;
      for (int j = 0; j < A3 + 2; j++) z[j] = tz[j][k];
      check(z == (A3+2)'(ta[k]) + (A3+2)'(tbv[k]) + (A3+2)'(tc[k]), $sformatf("3-operand sum %0d", k));
    end
    for (int i = 0; i < GW; i++) check(gz[i] == gbits[i], $sformatf("gate lane %0d", i));
    nx = 0; ny = 0;
    for (int k = 0; k < KS; k++)
      if (scv[k]) begin check(sx[nx] == sav[k], "switch x"); nx++; end
      else begin check(sy[ny] == sav[k], "switch y"); ny++; end
    for (int k = 0; k < KP; k++)
      for (int i = 0; i < PW; i++) check(pz[PW*k+i] == pbits[i][k], $sformatf("serial word %0d bit %0d", k, i));
    check(cz == cbits, "chain tokens");
    check(qz == parbits, "parallel chains tokens");
    for (int i = 0; i < FW; i++) begin
      check(fz[i] == fbits[i], "flat shim tokens");
      check(f_t1[i] - f_t0[i] == 2, "flat shim thickness");
    end
    for (int i = 0; i < SW; i++) begin
      check(kz[i] == kbits[i], "skewed shim tokens");
      check(k_t1[i] - k_t0[i] == i, "skewed shim thickness");
    end
    for (int k = 0; k < KGS; k++)
      check(gsum[k] == (GN+1)'(gopa[k]) + (GN+1)'(gopb[k]), $sformatf("G-SLA sum %0d", k));
    $display("mechanisms:");
    mechanism(n_mul_overlap, "multiplier: 3+ products in flight");
    mechanism(n_add_overlap, "64-bit adder: 3+ sums overlapping");
    mechanism(n_backpressure, "adder: result held by stalled sink");
    mechanism(n_gate_hold, "gate: data waiting for control");
    mechanism(n_sw_x, "switch: routed to x");
    mechanism(n_sw_y, "switch: routed to y");
    mechanism(n_gsla_rows, "G-SLA: rows of two bits firing together");
    mechanism(n_p2s_ooo, "par-to-ser: bit waiting out of turn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
