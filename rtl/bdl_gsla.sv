// bdl_gsla: a programmable G-SLA, the storage/logic array that token nets
// are mapped onto. The array has R rows and C columns. Each column is one
// tristable storage element holding E (empty), 0 or 1, i.e. one place of the
// net. Each row is one firing event of a transition: every cell on the row
// holds a test of its column ("-", "E", "0" or "1") and an action on it
// ("-", "x" = empty, "r" = put 0, "s" = put 1). The tests of a row are ANDed;
// when they all hold, the row fires and all its actions are applied. The
// input cells "0"/"1" (test and empty) and output cells "r"/"s" (test empty
// and put) are the bdl_pkg constants GC_IN0/1 and GC_OUTR/S. A transition
// that can fire with either color takes two rows, one per color.
//
// Timing: a row fires in the clock cycle its tests hold, and its actions take
// effect at the next clock edge, so one firing takes one cycle as in every
// other block of this library. Rows that touch a common column are not
// allowed to fire in the same cycle: a row that shares a column with a
// lower-numbered row that fires waits (fixed priority, lowest row first).
// Programs produced by the mapping of a token net only have such conflicts
// where transitions compete for a place.
//
// Interface: prog_i is the program (row r, column c), static while running.
// init_i is the power-up marking of each column, loaded at reset; this
// replaces the circled 0/1 written in a column's storage region. col_o shows
// each column. The environment puts a token into an empty column with
// put/put_val and empties a full column with take; a row touching a column
// the environment accesses in that cycle waits.
//
// The cell language, the tristable columns, the conjunctive row tests and
// the shorthands follow the document. Split rows and columns are a layout
// matter there and appear here simply as separate columns. The program and
// initial marking as ports, the environment access and the fixed-priority
// conflict rule are this design's choices.
module bdl_gsla
  import bdl_pkg::*;
#(
  parameter int R = 36,
  parameter int C = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  gsla_cell_t prog_i [R][C],
  input  token_t     init_i [C],
  input  logic [C-1:0] put,
  input  logic [C-1:0] put_val,
  input  logic [C-1:0] take,
  output token_t     col_o  [C],
  output logic [R-1:0] fired_o
);

  token_t       col [C];
  logic [R-1:0] en, fire;

  // row tests and conflict resolution
  always_comb begin
    logic [C-1:0] claimed;
    claimed = put | take;
    for (int r = 0; r < R; r++) begin
      logic [C-1:0] touch;
      en[r] = 1'b1;
      touch = '0;
      for (int c = 0; c < C; c++) begin
        unique case (prog_i[r][c].test)
          GT_ANY: ;
          GT_E:   if (col[c].full) en[r] = 1'b0;
          GT_0:   if (!col[c].full || col[c].val) en[r] = 1'b0;
          GT_1:   if (!col[c].full || !col[c].val) en[r] = 1'b0;
        endcase
        touch[c] = (prog_i[r][c] != GC_EMPTY);
      end
      fire[r] = en[r] && ((touch & claimed) == '0);
      if (fire[r]) claimed = claimed | touch;
    end
  end

  // column storage
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < C; c++) col[c] <= init_i[c];
    end else begin
      for (int c = 0; c < C; c++) begin
        if (put[c]) col[c] <= '{full: 1'b1, val: put_val[c]};
        if (take[c]) col[c].full <= 1'b0;
        for (int r = 0; r < R; r++) begin
          if (fire[r]) begin
            unique case (prog_i[r][c].act)
              GA_NONE: ;
              GA_X:    col[c].full <= 1'b0;
              GA_R:    col[c] <= '{full: 1'b1, val: 1'b0};
              GA_S:    col[c] <= '{full: 1'b1, val: 1'b1};
            endcase
          end
        end
      end
    end
  end

  // the environment follows the same rule as the rows
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < C; c++) begin
        if (put[c])  assert (!col[c].full) else $error("token put into a full column");
        if (take[c]) assert (col[c].full)  else $error("token taken from an empty column");
      end
    end
  end

  assign col_o   = col;
  assign fired_o = fire;

endmodule
