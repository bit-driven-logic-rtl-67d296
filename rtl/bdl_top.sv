// bdl_top: the bit-driven logic designs side by side, each with its own
// token ports.
//
//   mul_*   W x W array multiplier (main design, W = 4)
//   add_*   N-bit bit-pipelined ripple-carry adder (N = 64)
//   add3_*  three-operand adder (4-bit operands)
//   gate_*  3-bit gate released by a control token
//   sw_*    switch routing a data token by a control token
//   p2s_*   3-bit parallel-to-serial converter
//   ch_*    linear chain (FIFO) of 7 places
//   par_*   two parallel chains between a fork and a join
//   flat_*  flat shim, skew_* skewed shim
//   gsla_*  programmable G-SLA array (36 rows x 20 columns, enough for the
//           five-bit adder program); its program and initial marking are
//           ports, and its columns are read and written directly
//
// Every port carries tokens: an input is a place owned by the environment
// (token_t in, *_take out: the design removed the token at this clock edge);
// an output is a place owned by the design (token_t out, *_take in: the
// environment removes the token at this clock edge). A design never puts into
// a full place, so the environment controls the rate simply by leaving tokens
// in place. All places are emptied by rst_n (synchronous, active low) except
// the initial token of the parallel-to-serial sequencer. One transition
// firing takes one clock. The designs share nothing but clock and reset.
module bdl_top
  import bdl_pkg::*;
#(
  parameter int MUL_W       = 4,
  parameter int ADD_N       = 64,
  parameter int ADD3_N      = 4,
  parameter int GATE_W      = 3,
  parameter int P2S_W       = 3,
  parameter int CHAIN_DEPTH = 6,
  parameter int PAR_M       = 4,
  parameter int PAR_N       = 4,
  parameter int FLAT_W      = 4,
  parameter int FLAT_THICK  = 2,
  parameter int SKEW_W      = 3,
  parameter int SKEW_S      = 1,
  parameter int GSLA_R      = 36,
  parameter int GSLA_C      = 20
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // multiplier
  input  token_t                mul_a_i    [MUL_W],
  output logic [MUL_W-1:0]      mul_a_take,
  input  token_t                mul_b_i    [MUL_W],
  output logic [MUL_W-1:0]      mul_b_take,
  output token_t                mul_z_o    [2*MUL_W],
  input  logic [2*MUL_W-1:0]    mul_z_take,
  // ripple-carry adder
  input  token_t                add_a_i    [ADD_N],
  output logic [ADD_N-1:0]      add_a_take,
  input  token_t                add_b_i    [ADD_N],
  output logic [ADD_N-1:0]      add_b_take,
  output token_t                add_z_o    [ADD_N+1],
  input  logic [ADD_N:0]        add_z_take,
  // three-operand adder
  input  token_t                add3_a_i   [ADD3_N],
  output logic [ADD3_N-1:0]     add3_a_take,
  input  token_t                add3_b_i   [ADD3_N],
  output logic [ADD3_N-1:0]     add3_b_take,
  input  token_t                add3_c_i   [ADD3_N],
  output logic [ADD3_N-1:0]     add3_c_take,
  output token_t                add3_z_o   [ADD3_N+2],
  input  logic [ADD3_N+1:0]     add3_z_take,
  // gate
  input  token_t                gate_a_i   [GATE_W],
  output logic [GATE_W-1:0]     gate_a_take,
  input  token_t                gate_c_i,
  output logic                  gate_c_take,
  output token_t                gate_z_o   [GATE_W],
  input  logic [GATE_W-1:0]     gate_z_take,
  // switch
  input  token_t                sw_a_i,
  output logic                  sw_a_take,
  input  token_t                sw_c_i,
  output logic                  sw_c_take,
  output token_t                sw_x_o,
  input  logic                  sw_x_take,
  output token_t                sw_y_o,
  input  logic                  sw_y_take,
  // parallel-to-serial converter
  input  token_t                p2s_a_i    [P2S_W],
  output logic [P2S_W-1:0]      p2s_a_take,
  output token_t                p2s_z_o,
  input  logic                  p2s_z_take,
  // linear chain
  input  token_t                ch_i,
  output logic                  ch_take,
  output token_t                ch_o,
  input  logic                  ch_otake,
  // parallel chains
  input  token_t                par_i,
  output logic                  par_take,
  output token_t                par_o,
  input  logic                  par_otake,
  // flat shim
  input  token_t                flat_i     [FLAT_W],
  output logic [FLAT_W-1:0]     flat_take,
  output token_t                flat_o     [FLAT_W],
  input  logic [FLAT_W-1:0]     flat_otake,
  // skewed shim
  input  token_t                skew_i     [SKEW_W],
  output logic [SKEW_W-1:0]     skew_take,
  output token_t                skew_o     [SKEW_W],
  input  logic [SKEW_W-1:0]     skew_otake,
  // G-SLA
  input  gsla_cell_t            gsla_prog_i [GSLA_R][GSLA_C],
  input  token_t                gsla_init_i [GSLA_C],
  input  logic [GSLA_C-1:0]     gsla_put,
  input  logic [GSLA_C-1:0]     gsla_put_val,
  input  logic [GSLA_C-1:0]     gsla_take,
  output token_t                gsla_col_o  [GSLA_C],
  output logic [GSLA_R-1:0]     gsla_fired_o
);

  bdl_multiplier #(.W(MUL_W)) u_mul (
    .clk, .rst_n,
    .a_i(mul_a_i), .a_take(mul_a_take), .b_i(mul_b_i), .b_take(mul_b_take),
    .z_o(mul_z_o), .z_take(mul_z_take)
  );

  bdl_ripple_adder #(.N(ADD_N)) u_add (
    .clk, .rst_n,
    .a_i(add_a_i), .a_take(add_a_take), .b_i(add_b_i), .b_take(add_b_take),
    .z_o(add_z_o), .z_take(add_z_take)
  );

  bdl_add3 #(.N(ADD3_N)) u_add3 (
    .clk, .rst_n,
    .a_i(add3_a_i), .a_take(add3_a_take), .b_i(add3_b_i), .b_take(add3_b_take),
    .c_i(add3_c_i), .c_take(add3_c_take), .z_o(add3_z_o), .z_take(add3_z_take)
  );

  bdl_gate #(.W(GATE_W)) u_gate (
    .clk, .rst_n,
    .a_i(gate_a_i), .a_take(gate_a_take), .c_i(gate_c_i), .c_take(gate_c_take),
    .z_o(gate_z_o), .z_take(gate_z_take)
  );

  bdl_switch u_sw (
    .clk, .rst_n,
    .a_i(sw_a_i), .a_take(sw_a_take), .c_i(sw_c_i), .c_take(sw_c_take),
    .x_o(sw_x_o), .x_take(sw_x_take), .y_o(sw_y_o), .y_take(sw_y_take)
  );

  bdl_par_to_ser #(.W(P2S_W)) u_p2s (
    .clk, .rst_n, .a_i(p2s_a_i), .a_take(p2s_a_take), .z_o(p2s_z_o), .z_take(p2s_z_take)
  );

  bdl_chain #(.DEPTH(CHAIN_DEPTH)) u_chain (
    .clk, .rst_n, .in_i(ch_i), .in_take(ch_take), .out_o(ch_o), .out_take(ch_otake)
  );

  bdl_parallel_chains #(.M(PAR_M), .N(PAR_N)) u_par (
    .clk, .rst_n, .in_i(par_i), .in_take(par_take), .out_o(par_o), .out_take(par_otake)
  );

  bdl_flat_shim #(.W(FLAT_W), .THICK(FLAT_THICK)) u_flat (
    .clk, .rst_n, .in_i(flat_i), .in_take(flat_take), .out_o(flat_o), .out_take(flat_otake)
  );

  bdl_skew_shim #(.W(SKEW_W), .SKEW(SKEW_S)) u_skew (
    .clk, .rst_n, .in_i(skew_i), .in_take(skew_take), .out_o(skew_o), .out_take(skew_otake)
  );

  bdl_gsla #(.R(GSLA_R), .C(GSLA_C)) u_gsla (
    .clk, .rst_n, .prog_i(gsla_prog_i), .init_i(gsla_init_i), .put(gsla_put), .put_val(gsla_put_val),
    .take(gsla_take), .col_o(gsla_col_o), .fired_o(gsla_fired_o)
  );

endmodule
