// ir_fpa_test_top: digital test logic for infrared focal plane arrays.
//
// Two test set-ups stand side by side, each with its own ports.
//
// 1. Test socket chip (sock_*).  A SOCK_ROWS x SOCK_COLS socket contacts a
//    whole detector array through aligned bump pads and connects one detector
//    at a time to an I/O pad, where an instrument measures its dark current.
//    calib_sequencer addresses every pixel (or one chosen pixel, sock_single)
//    in the four selection cases,
//    socket_select turns address and disable pins into row and column select
//    lines (sock_row_sel/sock_col_sel, to the analog switch array), and
//    leakage_calibrator turns the four measured currents into the pixel's
//    dark current with the OFF-switch leakage removed (sock_cal_*, one cycle
//    after the fourth measurement; sock_done comes with the last pixel).
//
// 2. Readout chip crosscheck test (ro_*).  Two select_shift_registers drive
//    the row and column select switches of an RO_M-column x RO_N-row readout
//    array whose cells carry built-in current sources (ro_row_sel/ro_col_sel).
//    crosscheck_controller runs either the M+N full-row/full-column tests of
//    the crosscheck scheme or M*N single-cell tests (ro_mode), and
//    crosscheck_analyzer compares the measured sums with the fault-free values
//    and builds the failure map.  The analyzer flags are cleared by ro_start.
//
// The analog arrays and the current-measuring instrument are outside: their
// select lines leave as outputs and each measurement comes back through a
// request/acknowledge handshake (meas_req high until meas_ack with the current
// code).  Sizes: 128 x 128 socket and 4 x 4 readout, as in the document's
// chips.  Timing per block is given in each block's header.
module ir_fpa_test_top
  import fpa_test_pkg::*;
#(
  parameter int unsigned SOCK_ROWS   = 128,
  parameter int unsigned SOCK_COLS   = 128,
  parameter int unsigned SOCK_SETTLE = 2,
  parameter int unsigned RO_M        = 4,   // readout columns
  parameter int unsigned RO_N        = 4,   // readout rows
  localparam int unsigned SRAW = (SOCK_ROWS > 1) ? $clog2(SOCK_ROWS) : 1,
  localparam int unsigned SCAW = (SOCK_COLS > 1) ? $clog2(SOCK_COLS) : 1,
  localparam int unsigned RRIW = (RO_N > 1) ? $clog2(RO_N) : 1,
  localparam int unsigned RCIW = (RO_M > 1) ? $clog2(RO_M) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,

  // ---- test socket chip ----
  input  logic                     sock_start,
  input  logic                     sock_single,   // with sock_start: one pixel only
  input  logic [SRAW-1:0]          sock_pix_row,
  input  logic [SCAW-1:0]          sock_pix_col,
  output logic                     sock_busy,
  output logic                     sock_done,
  output logic [SOCK_ROWS-1:0]     sock_row_sel,
  output logic [SOCK_COLS-1:0]     sock_col_sel,
  output logic                     sock_meas_req,
  input  logic                     sock_meas_ack,
  input  current_t                 sock_meas_current,
  output logic                     sock_cal_valid,
  output logic [SRAW-1:0]          sock_cal_row,
  output logic [SCAW-1:0]          sock_cal_col,
  output current_t                 sock_cal_i_dark,
  output current_t                 sock_cal_i_dark_approx,

  // ---- readout chip crosscheck test ----
  input  logic                     ro_start,
  input  test_mode_t               ro_mode,
  input  current_t                 ro_unit_current,
  input  current_t                 ro_tolerance,
  output logic                     ro_busy,
  output logic                     ro_done,
  output logic [RO_N-1:0]          ro_row_sel,
  output logic [RO_M-1:0]          ro_col_sel,
  output logic                     ro_meas_req,
  input  logic                     ro_meas_ack,
  input  current_t                 ro_meas_current,
  output logic                     ro_result_valid,
  output result_kind_t             ro_result_kind,
  output logic [RRIW-1:0]          ro_result_row,
  output logic [RCIW-1:0]          ro_result_col,
  output current_t                 ro_result_current,
  output logic [RO_N-1:0]          ro_row_low,
  output logic [RO_N-1:0]          ro_row_high,
  output logic [RO_M-1:0]          ro_col_low,
  output logic [RO_M-1:0]          ro_col_high,
  output logic [RO_N-1:0][RO_M-1:0] ro_open_map,
  output logic [RO_N-1:0][RO_M-1:0] ro_large_map,
  output logic                     ro_fault_detected
);

  // ------------------------------------------------------------------
  // Test socket chip
  // ------------------------------------------------------------------
  logic [SRAW-1:0] s_row_addr, s_cal_row;
  logic [SCAW-1:0] s_col_addr, s_cal_col;
  logic            s_row_dis, s_col_dis, s_cal_valid, s_seq_done;
  current_t        s_i1, s_i2, s_i3, s_i4;
  logic [SRAW+SCAW-1:0] s_tag_out;

  calib_sequencer #(
    .ROWS(SOCK_ROWS), .COLS(SOCK_COLS), .SETTLE(SOCK_SETTLE)
  ) u_calib_seq (
    .clk, .rst_n,
    .start        (sock_start),
    .single       (sock_single),
    .pix_row      (sock_pix_row),
    .pix_col      (sock_pix_col),
    .busy         (sock_busy),
    .done         (s_seq_done),
    .row_addr     (s_row_addr),
    .col_addr     (s_col_addr),
    .row_disable  (s_row_dis),
    .col_disable  (s_col_dis),
    .meas_req     (sock_meas_req),
    .meas_ack     (sock_meas_ack),
    .meas_current (sock_meas_current),
    .cal_valid    (s_cal_valid),
    .cal_row      (s_cal_row),
    .cal_col      (s_cal_col),
    .cal_i1       (s_i1),
    .cal_i2       (s_i2),
    .cal_i3       (s_i3),
    .cal_i4       (s_i4)
  );

  socket_select #(.ROWS(SOCK_ROWS), .COLS(SOCK_COLS)) u_socket_select (
    .row_addr    (s_row_addr),
    .col_addr    (s_col_addr),
    .row_disable (s_row_dis),
    .col_disable (s_col_dis),
    .row_sel     (sock_row_sel),
    .col_sel     (sock_col_sel)
  );

  leakage_calibrator #(
    .ROWS(SOCK_ROWS), .COLS(SOCK_COLS), .TAG_W(SRAW + SCAW)
  ) u_calibrator (
    .clk, .rst_n,
    .in_valid      (s_cal_valid),
    .i1            (s_i1),
    .i2            (s_i2),
    .i3            (s_i3),
    .i4            (s_i4),
    .in_tag        ({s_cal_row, s_cal_col}),
    .out_valid     (sock_cal_valid),
    .i_dark        (sock_cal_i_dark),
    .i_dark_approx (sock_cal_i_dark_approx),
    .out_tag       (s_tag_out)
  );

  assign {sock_cal_row, sock_cal_col} = s_tag_out;

  // The calibrator adds one cycle: delay done so that it comes with the last
  // calibrated pixel.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sock_done <= 1'b0;
    else        sock_done <= s_seq_done;
  end

  // ------------------------------------------------------------------
  // Readout chip crosscheck test
  // ------------------------------------------------------------------
  sr_op_t          r_row_op, r_col_op;

  crosscheck_controller #(.M(RO_M), .N(RO_N)) u_xc_ctrl (
    .clk, .rst_n,
    .start          (ro_start),
    .mode           (ro_mode),
    .busy           (ro_busy),
    .done           (ro_done),
    .row_op         (r_row_op),
    .col_op         (r_col_op),
    .meas_req       (ro_meas_req),
    .meas_ack       (ro_meas_ack),
    .meas_current   (ro_meas_current),
    .result_valid   (ro_result_valid),
    .result_kind    (ro_result_kind),
    .result_row     (ro_result_row),
    .result_col     (ro_result_col),
    .result_current (ro_result_current)
  );

  select_shift_register #(.LEN(RO_N)) u_row_sr (
    .clk, .rst_n,
    .op       (r_row_op),
    .sin      (1'b0),        // a shift moves the token, nothing enters
    .load_val (RO_N'(1)),    // a load places the token on line 0
    .q        (ro_row_sel),
    .sout     ()             // no cascading
  );

  select_shift_register #(.LEN(RO_M)) u_col_sr (
    .clk, .rst_n,
    .op       (r_col_op),
    .sin      (1'b0),        // a shift moves the token, nothing enters
    .load_val (RO_M'(1)),    // a load places the token on line 0
    .q        (ro_col_sel),
    .sout     ()             // no cascading
  );

  crosscheck_analyzer #(.M(RO_M), .N(RO_N)) u_xc_analyzer (
    .clk, .rst_n,
    .clear          (ro_start && !ro_busy),
    .unit_current   (ro_unit_current),
    .tolerance      (ro_tolerance),
    .res_valid      (ro_result_valid),
    .res_kind       (ro_result_kind),
    .res_row        (ro_result_row),
    .res_col        (ro_result_col),
    .res_current    (ro_result_current),
    .row_low        (ro_row_low),
    .row_high       (ro_row_high),
    .col_low        (ro_col_low),
    .col_high       (ro_col_high),
    .open_map       (ro_open_map),
    .large_map      (ro_large_map),
    .fault_detected (ro_fault_detected)
  );

  // While a readout measurement is requested, the selection must match the
  // test: one row and one column for a cell, one row and every column for a
  // row test, every row and one column for a column test.
  sel_matches_test: assert property (@(posedge clk) disable iff (!rst_n)
    ro_meas_req |->
      ((ro_result_kind == RES_CELL) ? ($onehot(ro_row_sel) && $onehot(ro_col_sel)) :
       (ro_result_kind == RES_ROW)  ? ($onehot(ro_row_sel) && (&ro_col_sel)) :
                                      ((&ro_row_sel) && $onehot(ro_col_sel))));

  // The socket chip never selects more than one row or column.
  sock_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(sock_row_sel) && $onehot0(sock_col_sel));

endmodule
