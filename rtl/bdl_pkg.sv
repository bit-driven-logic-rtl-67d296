// bdl_pkg: shared types of the bit-driven logic library.
//
// A place of a token net holds no token (empty), a 0 token or a 1 token. It
// is carried between modules as token_t: `full` says a token is present and
// `val` gives its color. arc_t is the label of an arc between a place and a
// transition: unmarked, a required/produced 0 or 1, or inverting (complement).
// gsla_cell_t is one programmed cell of the G-SLA array (see bdl_gsla): a
// test on the cell's column and an action on it, applied when the row fires.
package bdl_pkg;

  typedef struct packed {
    logic full;  // a token is present
    logic val;   // its color, meaningful only when full
  } token_t;

  typedef enum logic [1:0] {
    ARC_PLAIN = 2'd0,  // unmarked: the transition's color
    ARC_ZERO  = 2'd1,  // "0"
    ARC_ONE   = 2'd2,  // "1"
    ARC_INV   = 2'd3   // inverting circle: complement of the color
  } arc_t;

  // G-SLA cell test: the column must be in this state for the row to fire
  typedef enum logic [1:0] {
    GT_ANY = 2'd0,  // "-": state irrelevant
    GT_E   = 2'd1,  // "E": empty
    GT_0   = 2'd2,  // "0"
    GT_1   = 2'd3   // "1"
  } gsla_test_t;

  // G-SLA cell action, applied to the column when the row fires
  typedef enum logic [1:0] {
    GA_NONE = 2'd0,  // "-": no action
    GA_X    = 2'd1,  // "x": make empty
    GA_R    = 2'd2,  // "r": put a 0
    GA_S    = 2'd3   // "s": put a 1
  } gsla_act_t;

  typedef struct packed {
    gsla_test_t test;
    gsla_act_t  act;
  } gsla_cell_t;

  // empty cell, and the single-character shorthands of the G-SLA language:
  // inputs "0"/"1" (test the color and consume) and outputs "r"/"s" (test
  // empty and put a token)
  localparam gsla_cell_t GC_EMPTY = '{GT_ANY, GA_NONE};
  localparam gsla_cell_t GC_IN0   = '{GT_0, GA_X};
  localparam gsla_cell_t GC_IN1   = '{GT_1, GA_X};
  localparam gsla_cell_t GC_OUTR  = '{GT_E, GA_R};
  localparam gsla_cell_t GC_OUTS  = '{GT_E, GA_S};

endpackage
