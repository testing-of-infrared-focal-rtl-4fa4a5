// tb_calib_sequencer: runs the four-case calibration scan on a 4 x 3 socket.
//
// The sequencer drives the selection logic and a switch-array model; an
// instrument model answers each request after a random delay.  Checked here:
// the pixel order (row by row), the case order of the disable pins
// (11, 10, 01, 00), that the selection was stable for SETTLE cycles before
// each request, the four currents reported per pixel against the leakage
// sums worked out here, the number of measurements (4 per pixel) and the
// single done pulse.  Then single-pixel calibrations of chosen pixels, the
// random-access use of the socket.
module tb_calib_sequencer;
  import fpa_test_pkg::*;
  import fpa_tb_pkg::*;

  localparam int R = 4, C = 3, SETTLE = 2;
  localparam int IR = 3, IC = 5, ICR = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, single;
  logic [1:0] pix_row, pix_col;
  logic [1:0] row_addr, col_addr, cal_row, cal_col;
  logic row_dis, col_dis, meas_req, meas_ack, cal_valid;
  current_t meas_current, pad, i1, i2, i3, i4;
  logic [R-1:0] row_sel;
  logic [C-1:0] col_sel;
  int n_meas;
  int checks = 0, failures = 0;

  calib_sequencer #(.ROWS(R), .COLS(C), .SETTLE(SETTLE)) dut (
    .clk, .rst_n, .start, .single, .pix_row, .pix_col, .busy, .done,
    .row_addr, .col_addr, .row_disable(row_dis), .col_disable(col_dis),
    .meas_req, .meas_ack, .meas_current,
    .cal_valid, .cal_row, .cal_col, .cal_i1(i1), .cal_i2(i2), .cal_i3(i3), .cal_i4(i4));

  socket_select #(.ROWS(R), .COLS(C)) u_sel (
    .row_addr, .col_addr, .row_disable(row_dis), .col_disable(col_dis), .row_sel, .col_sel);

  socket_array_model #(.ROWS(R), .COLS(C), .I_ROFF(IR), .I_COFF(IC), .I_CROFF(ICR)) u_array (
    .row_sel, .col_sel, .pad_current(pad));

  meter_model #(.MAX_LAT(4)) u_meter (
    .clk, .rst_n, .req(meas_req), .current_in(pad), .ack(meas_ack),
    .current_out(meas_current), .n_meas);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Selection stability before each request, and the case order.
  logic [5:0] prev_sel;
  int stable;
  logic prev_req;
  int case_idx;
  always @(posedge clk) begin
    if (rst_n) begin
      if ({row_addr, col_addr, row_dis, col_dis} != prev_sel) stable <= 0;
      else stable <= stable + 1;
      prev_sel <= {row_addr, col_addr, row_dis, col_dis};
      prev_req <= meas_req;
      if (meas_req && !prev_req) begin
        logic [1:0] exp_dis;
        exp_dis = (case_idx == 0) ? 2'b11 : (case_idx == 1) ? 2'b10 : (case_idx == 2) ? 2'b01 : 2'b00;
        check({row_dis, col_dis} == exp_dis, "case order");
        check(stable >= SETTLE, "settle time before request");
        case_idx <= (case_idx + 1) % 4;
      end
    end
  end

  int n_cal, n_done;
  always @(posedge clk) begin
    if (rst_n && cal_valid) begin
      int r, c;
      r = single ? int'(pix_row) : n_cal / C;
      c = single ? int'(pix_col) : n_cal % C;
      check(cal_row == 2'(r) && cal_col == 2'(c), $sformatf("pixel order %0d,%0d", cal_row, cal_col));
      check(longint'(i1) == longint'(C) * ICR, "I1");
      check(longint'(i2) == longint'(R) * IR + longint'(C - 1) * ICR, "I2");
      check(longint'(i3) == longint'(C) * IC, "I3");
      check(longint'(i4) == longint'(socket_dark(r, c)) + longint'(R - 1) * IR + longint'(C - 1) * IC, "I4");
      n_cal <= n_cal + 1;
    end
    if (rst_n && done) n_done <= n_done + 1;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; single = 0; pix_row = 0; pix_col = 0; n_cal = 0; n_done = 0; case_idx = 0; stable = 0; prev_sel = '0; prev_req = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    check(!busy, "idle after reset");
    start = 1;
    @(posedge clk);
    #1;
    start = 0;
    check(busy, "busy after start");
    wait (done);
    @(posedge clk);
    #1;
    check(!busy, "idle after done");
    check(n_cal == R * C, $sformatf("pixels calibrated %0d", n_cal));
    check(n_meas == 4 * R * C, $sformatf("measurements %0d", n_meas));
    repeat (5) @(posedge clk);
    check(n_done == 1, "one done pulse");
    // single-pixel calibrations
    for (int n = 0; n < 6; n++) begin
      int c0, m0, d0;
      c0 = n_cal; m0 = n_meas; d0 = n_done;
      single = 1;
      pix_row = 2'($urandom_range(R - 1, 0));
      pix_col = 2'($urandom_range(C - 1, 0));
      start = 1;
      @(posedge clk);
      #1;
      start = 0;
      wait (done);
      @(posedge clk);
      #1;
      check(n_cal - c0 == 1, "single mode calibrates one pixel");
      check(n_meas - m0 == 4, "single mode takes four measurements");
      check(n_done - d0 == 1 && !busy, "single mode ends");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
