// tb_ir_fpa_test_top: end-to-end test of both test set-ups at full size.
//
// Socket side: the 128 x 128 calibration scan runs against a switch-array
// model with OFF-switch leakage and an instrument model.  Every pixel's
// calibrated dark current must equal the detector's dark current exactly,
// while the uncalibrated reading (case 4 alone) and the approximation
// I4-I3-I2+I1 must be off by the leakage; pixels with a large dark current
// must stand out.  Single pixels are then recalibrated by random access.
// Readout side (in parallel): the 4 x 4 readout array model is loaded with the
// four measured cases and the two masking patterns and tested in crosscheck
// mode; the measured good case and the open-fault case are also tested in
// normal mode.  The failure flags are compared with the expected outcome of
// each case.
// Every mechanism is counted (the four selection cases, leakage removal,
// row, column and cell tests, mode switches, open and large-current location,
// masking) and one that never happened counts as a failure.
module tb_ir_fpa_test_top;
  import fpa_test_pkg::*;
  import fpa_tb_pkg::*;

  localparam int SR = 128, SC = 128, M = 4, N = 4;
  localparam int IR = 3, IC = 5, ICR = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // socket side
  logic sock_single;
  logic [6:0] sock_pix_row, sock_pix_col;
  logic sock_start, sock_busy, sock_done, sock_meas_req, sock_meas_ack, sock_cal_valid;
  logic [SR-1:0] sock_row_sel;
  logic [SC-1:0] sock_col_sel;
  current_t sock_pad, sock_meas_current, sock_i_dark, sock_i_approx;
  logic [6:0] sock_cal_row, sock_cal_col;
  int sock_n_meas;
  // readout side
  logic ro_start, ro_busy, ro_done, ro_meas_req, ro_meas_ack, ro_result_valid, ro_fault;
  test_mode_t ro_mode;
  current_t ro_unit, ro_tol, ro_node, ro_meas_current, ro_result_current;
  logic [N-1:0] ro_row_sel, ro_row_low, ro_row_high;
  logic [M-1:0] ro_col_sel, ro_col_low, ro_col_high;
  result_kind_t ro_result_kind;
  logic [1:0] ro_result_row, ro_result_col;
  logic [N-1:0][M-1:0] ro_open_map, ro_large_map;
  current_t cell_i [N][M];
  logic short_en;
  int sh_ar, sh_ac, sh_br, sh_bc, ro_n_meas;

  int checks = 0, failures = 0;

  ir_fpa_test_top dut (
    .clk, .rst_n,
    .sock_start, .sock_single, .sock_pix_row, .sock_pix_col, .sock_busy, .sock_done, .sock_row_sel, .sock_col_sel,
    .sock_meas_req, .sock_meas_ack, .sock_meas_current,
    .sock_cal_valid, .sock_cal_row, .sock_cal_col,
    .sock_cal_i_dark(sock_i_dark), .sock_cal_i_dark_approx(sock_i_approx),
    .ro_start, .ro_mode, .ro_unit_current(ro_unit), .ro_tolerance(ro_tol),
    .ro_busy, .ro_done, .ro_row_sel, .ro_col_sel,
    .ro_meas_req, .ro_meas_ack, .ro_meas_current,
    .ro_result_valid, .ro_result_kind, .ro_result_row, .ro_result_col, .ro_result_current,
    .ro_row_low, .ro_row_high, .ro_col_low, .ro_col_high,
    .ro_open_map, .ro_large_map, .ro_fault_detected(ro_fault));

  socket_array_model #(.ROWS(SR), .COLS(SC), .I_ROFF(IR), .I_COFF(IC), .I_CROFF(ICR)) u_sock_array (
    .row_sel(sock_row_sel), .col_sel(sock_col_sel), .pad_current(sock_pad));
  meter_model #(.MAX_LAT(2)) u_sock_meter (.clk, .rst_n, .req(sock_meas_req),
    .current_in(sock_pad), .ack(sock_meas_ack), .current_out(sock_meas_current), .n_meas(sock_n_meas));

  readout_array_model #(.M(M), .N(N)) u_ro_array (
    .row_sel(ro_row_sel), .col_sel(ro_col_sel), .cell_i, .short_en,
    .short_ar(sh_ar), .short_ac(sh_ac), .short_br(sh_br), .short_bc(sh_bc), .node_current(ro_node));
  meter_model #(.MAX_LAT(3)) u_ro_meter (.clk, .rst_n, .req(ro_meas_req),
    .current_in(ro_node), .ack(ro_meas_ack), .current_out(ro_meas_current), .n_meas(ro_n_meas));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- mechanism counters ----
  int n_case [4];
  int n_single;
  int n_leak_removed, n_defect_found, n_defect_expected;
  int n_row_tests, n_col_tests, n_cell_tests, n_mode_switch;
  int n_open_located, n_large_located, n_masked;

  // Count socket selection cases at each measurement.
  always @(posedge clk) begin
    if (rst_n && sock_meas_ack) begin
      int nr, nc;
      nr = $countones(sock_row_sel);
      nc = $countones(sock_col_sel);
      n_case[{nr[0], nc[0]}]++;  // 0: case 1, 1: case 2, 2: case 3, 3: case 4
    end
    if (rst_n && ro_result_valid) begin
      unique case (ro_result_kind)
        RES_ROW: n_row_tests++;
        RES_COL: n_col_tests++;
        default: n_cell_tests++;
      endcase
    end
  end

  // Check every calibrated pixel.
  int n_cal;
  always @(posedge clk) begin
    if (rst_n && sock_cal_valid) begin
      int r, c;
      longint d, raw;
      r = sock_single ? int'(sock_pix_row) : n_cal / SC;
      c = sock_single ? int'(sock_pix_col) : n_cal % SC;
      d = longint'(socket_dark(r, c));
      raw = d + longint'(SR - 1) * IR + longint'(SC - 1) * IC;
      check(sock_cal_row == 7'(r) && sock_cal_col == 7'(c), "socket pixel order");
      check(longint'(sock_i_dark) == d, $sformatf("calibrated dark current (%0d,%0d)", r, c));
      check(longint'(sock_i_approx) == d - IR - IC + ICR, "approximate calibration");
      if (longint'(sock_i_dark) == d && raw != d) n_leak_removed++;
      if (d > 1000) n_defect_expected++;
      if (sock_i_dark > 1000) n_defect_found++;
      n_cal <= n_cal + 1;
    end
  end

  task automatic ro_run(test_mode_t m);
    if (m != ro_mode) n_mode_switch++;
    ro_mode = m;
    ro_start = 1;
    @(posedge clk);
    #1;
    ro_start = 0;
    wait (ro_done);
    @(posedge clk);
    #1;
  endtask

  task automatic ro_load(int t);
    for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) cell_i[r][c] = xc_table(t, r, c);
    short_en = xc_short(t, sh_ar, sh_ac, sh_br, sh_bc);
  endtask

  task automatic readout_side();
    // measured cases in crosscheck mode
    for (int t = 0; t < 4; t++) begin
      int m0;
      ro_load(t);
      m0 = ro_n_meas;
      ro_run(MODE_CROSSCHECK);
      check(ro_n_meas - m0 == M + N, "crosscheck takes M+N measurements");
      unique case (t)
        0: check(!ro_fault, "good case: no fault");
        1: begin
          check(ro_row_low == 4'b0100 && ro_col_low == 4'b0010, "open: row 3 and column 2 low");
          check(ro_open_map == 16'(1 << (2 * M + 1)), "open: cell(3,2) located");
          if (ro_open_map != 0) n_open_located++;
        end
        2: begin
          check(ro_col_high == 4'b1100 && ro_row_high == 0 && ro_row_low == 0, "short: columns 3,4 high, row 4 masked");
          if (ro_fault && ro_row_high == 0) n_masked++;
        end
        default: begin
          check(ro_row_high == 4'b0010 && ro_col_low == 4'b0010 && ro_row_low == 0,
                "open+short: row 2 high, column 2 low, row 3 masked");
          if (ro_row_low == 0) n_masked++;
        end
      endcase
    end
    // a large-current cell, located by crossing
    ro_load(0);
    cell_i[0][3] = 400;
    ro_run(MODE_CROSSCHECK);
    check(ro_large_map == 16'(1 << 3) && ro_open_map == 0, "large-current cell(1,4) located");
    if (ro_large_map != 0) n_large_located++;
    // quadruple fault: fully masked
    ro_load(0);
    for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) cell_i[r][c] = 95;
    cell_i[1][0] = 0; cell_i[1][2] = 190; cell_i[2][0] = 190; cell_i[2][2] = 0;
    ro_run(MODE_CROSSCHECK);
    check(!ro_fault, "quadruple fault masked");
    if (!ro_fault) n_masked++;
    // normal mode on the good and the open-fault case
    ro_load(0);
    begin
      int m0;
      m0 = ro_n_meas;
      ro_run(MODE_NORMAL);
      check(ro_n_meas - m0 == M * N, "normal mode takes M*N measurements");
    end
    check(!ro_fault, "normal mode, good case");
    ro_load(1);
    ro_run(MODE_NORMAL);
    check(ro_open_map == 16'(1 << (2 * M + 1)) && ro_large_map == 0, "normal mode locates cell(3,2)");
    if (ro_open_map != 0) n_open_located++;
    ro_run(MODE_CROSSCHECK);
    check(ro_open_map == 16'(1 << (2 * M + 1)), "back to crosscheck");
  endtask

  task automatic socket_side();
    sock_start = 1;
    @(posedge clk);
    #1;
    sock_start = 0;
    wait (sock_done);
    @(posedge clk);
    #1;
    check(n_cal == SR * SC, $sformatf("pixels calibrated %0d", n_cal));
    check(sock_n_meas == 4 * SR * SC, "four measurements per pixel");
    // random access: recalibrate single pixels, first the defective pixel (1,2)
    for (int n = 0; n < 4; n++) begin
      int c0;
      c0 = n_cal;
      sock_single = 1;
      sock_pix_row = (n == 0) ? 7'd1 : 7'($urandom_range(SR - 1, 0));
      sock_pix_col = (n == 0) ? 7'd2 : 7'($urandom_range(SC - 1, 0));
      sock_start = 1;
      @(posedge clk);
      #1;
      sock_start = 0;
      wait (sock_done);
      @(posedge clk);
      #1;
      check(n_cal - c0 == 1, "single-pixel calibration");
      n_single++;
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sock_start = 0; sock_single = 0; sock_pix_row = 0; sock_pix_col = 0; n_single = 0;
    ro_start = 0; ro_mode = MODE_CROSSCHECK; ro_unit = 95; ro_tol = 30;
    short_en = 0; sh_ar = 0; sh_ac = 0; sh_br = 0; sh_bc = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) cell_i[r][c] = 95;
    n_cal = 0;
    n_case = '{0, 0, 0, 0};
    n_leak_removed = 0; n_defect_found = 0; n_defect_expected = 0;
    n_row_tests = 0; n_col_tests = 0; n_cell_tests = 0; n_mode_switch = 0;
    n_open_located = 0; n_large_located = 0; n_masked = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    fork
      socket_side();
      readout_side();
    join
    $display("single=%0d case1=%0d case2=%0d case3=%0d case4=%0d leak_removed=%0d defects=%0d/%0d",
             n_single, n_case[0], n_case[1], n_case[2], n_case[3], n_leak_removed, n_defect_found, n_defect_expected);
    $display("row_tests=%0d col_tests=%0d cell_tests=%0d mode_switches=%0d open_located=%0d large_located=%0d masked=%0d",
             n_row_tests, n_col_tests, n_cell_tests, n_mode_switch, n_open_located, n_large_located, n_masked);
    check(n_case[0] == SR * SC + 4 && n_case[1] == SR * SC + 4 && n_case[2] == SR * SC + 4 &&
          n_case[3] == SR * SC + 4, "each selection case once per pixel calibration");
    check(n_leak_removed == SR * SC + 4, "leakage removed at every pixel");
    check(n_single == 4, "single-pixel access happened");
    check(n_defect_found == n_defect_expected && n_defect_expected > 0, "large dark-current pixels found");
    check(n_row_tests > 0, "row tests happened");
    check(n_col_tests > 0, "column tests happened");
    check(n_cell_tests > 0, "cell tests happened");
    check(n_mode_switch > 0, "mode switch happened");
    check(n_open_located > 0, "open fault located");
    check(n_large_located > 0, "large-current fault located");
    check(n_masked > 0, "fault masking happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
