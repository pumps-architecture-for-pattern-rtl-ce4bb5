// sel_pkg -- types and constants shared by the selection processing module.
//
// The selection processing module filters records streamed bit-serially from a
// disk. Each key unit compares one field of every record against its key; the
// comparison kinds (equality, less than, greater than, proximity) follow the
// associative logic of the design. The encoding of the comparison code and the
// register map of the configuration bus are choices of this implementation.
package sel_pkg;

  // Comparison carried out by one associative logic unit.
  //   CMP_EQ   field == key (unmasked bits)
  //   CMP_LT   field <  key
  //   CMP_GT   field >  key   (used for histogram thresholds)
  //   CMP_PROX field differs from key in at most one unmasked bit
  typedef enum logic [1:0] {
    CMP_EQ   = 2'd0,
    CMP_LT   = 2'd1,
    CMP_GT   = 2'd2,
    CMP_PROX = 2'd3
  } cmp_op_e;

  // Operating mode of the module.
  typedef enum logic {
    MODE_SELECT = 1'b0,
    MODE_HIST   = 1'b1
  } sel_mode_e;

  // State delay flip-flops of one associative logic unit (E, X and L of the
  // bit-slice cell). e: all compared bits equal so far; p: exactly one compared
  // bit differs so far (proximity); l: field already known to be below the key.
  typedef struct packed {
    logic e;
    logic p;
    logic l;
  } cmp_state_t;

  localparam cmp_state_t CMP_STATE_INIT = '{e: 1'b1, p: 1'b0, l: 1'b0};

  // Per-unit control word written through the configuration bus.
  typedef struct packed {
    logic [15:0] start;    // bit offset of the unit's field within the record
    logic [11:0] rsvd;
    logic        project;  // the unit's field is part of the projection
    logic        cascade;  // start from the previous unit's final state
    cmp_op_e     op;       // comparison
  } unit_ctrl_t;

  // Configuration bus register map (word addresses, 12 bits).
  localparam logic [11:0] A_RECLEN     = 12'h000; // record length in bits
  localparam logic [11:0] A_MODE       = 12'h001; // bit 0: sel_mode_e
  localparam logic [11:0] A_CLR_CNT    = 12'h002; // any write clears all counters
  localparam logic [11:0] A_UNIT_EN    = 12'h003; // one enable bit per unit
  localparam logic [11:0] A_KEY_BASE   = 12'h100; // + unit: key
  localparam logic [11:0] A_MASK_BASE  = 12'h200; // + unit: mask, 1 = bit compared
  localparam logic [11:0] A_CTRL_BASE  = 12'h300; // + unit: unit_ctrl_t
  localparam logic [11:0] A_TERM_BASE  = 12'h400; // + SPAL number: append one DNF term
  localparam logic [11:0] A_TCLR_BASE  = 12'h480; // + SPAL number: erase that SPAL's terms

endpackage
