// fpa_test_pkg: types and constants shared by the focal-plane-array test logic.
//
// Currents travel through the design as signed integer codes (current_t) in the
// unit of the instrument that measured them; the logic never needs to know that
// unit.  The selection shift registers of the readout chip are commanded with
// sr_op_t, the crosscheck controller runs in one of two test_mode_t modes and
// reports each measurement tagged with a result_kind_t.  The encodings are this
// design's own choice.
package fpa_test_pkg;

  // Width of a measured current code.
  parameter int unsigned CUR_W = 32;
  typedef logic signed [CUR_W-1:0] current_t;

  // Commands of a selection shift register (row or column).
  typedef enum logic [2:0] {
    SR_HOLD   = 3'd0,  // keep contents
    SR_SHIFT  = 3'd1,  // shift by one stage, serial input enters stage 0
    SR_CLEAR  = 3'd2,  // every stage OFF
    SR_PRESET = 3'd3,  // every stage ON (select all lines)
    SR_LOAD   = 3'd4   // parallel load of a pattern
  } sr_op_t;

  // Readout test modes.
  typedef enum logic {
    MODE_NORMAL     = 1'b0,  // one cell per test, M*N tests
    MODE_CROSSCHECK = 1'b1   // one full row or column per test, M+N tests
  } test_mode_t;

  // What a reported measurement covered.
  typedef enum logic [1:0] {
    RES_CELL = 2'd0,  // a single cell (normal mode)
    RES_ROW  = 2'd1,  // a full row (crosscheck)
    RES_COL  = 2'd2   // a full column (crosscheck)
  } result_kind_t;

  // The four pixel-selection cases of the leakage calibration, with the
  // states of the row and column disable pins.
  typedef enum logic [1:0] {
    CASE1 = 2'd0,  // row and column disabled
    CASE2 = 2'd1,  // row disabled, column enabled
    CASE3 = 2'd2,  // row enabled, column disabled
    CASE4 = 2'd3   // normal selection
  } sel_case_t;

endpackage
