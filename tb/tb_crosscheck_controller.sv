// tb_crosscheck_controller: both test modes on a 4-column x 3-row array.
//
// The controller drives two selection shift registers, which select cells of
// a readout-array model with random distinct cell currents; an instrument
// model answers after a random delay.  In crosscheck mode the results must be
// the 3 row sums then the 4 column sums (M + N = 7 tests); in normal mode the
// 12 single cells row by row (M * N tests).  At every measurement the select
// lines are checked against the test being run.
module tb_crosscheck_controller;
  import fpa_test_pkg::*;

  localparam int M = 4, N = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  test_mode_t mode;
  sr_op_t row_op, col_op;
  logic row_sout, col_sout;
  logic [N-1:0] row_sel;
  logic [M-1:0] col_sel;
  logic meas_req, meas_ack, result_valid;
  current_t meas_current, node, result_current;
  result_kind_t result_kind;
  logic [1:0] result_row, result_col;
  current_t cell_i [N][M];
  int n_meas;
  int checks = 0, failures = 0;

  crosscheck_controller #(.M(M), .N(N)) dut (
    .clk, .rst_n, .start, .mode, .busy, .done,
    .row_op, .col_op,
    .meas_req, .meas_ack, .meas_current,
    .result_valid, .result_kind, .result_row, .result_col, .result_current);

  select_shift_register #(.LEN(N)) u_row_sr (.clk, .rst_n, .op(row_op), .sin(1'b0),
    .load_val(N'(1)), .q(row_sel), .sout(row_sout));
  select_shift_register #(.LEN(M)) u_col_sr (.clk, .rst_n, .op(col_op), .sin(1'b0),
    .load_val(M'(1)), .q(col_sel), .sout(col_sout));

  readout_array_model #(.M(M), .N(N)) u_array (
    .row_sel, .col_sel, .cell_i, .short_en(1'b0), .short_ar(0), .short_ac(0),
    .short_br(0), .short_bc(0), .node_current(node));

  meter_model #(.MAX_LAT(3)) u_meter (.clk, .rst_n, .req(meas_req), .current_in(node),
    .ack(meas_ack), .current_out(meas_current), .n_meas);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected result stream of the running test.
  int k;
  always @(posedge clk) begin
    if (rst_n && result_valid) begin
      longint s;
      s = 0;
      if (mode == MODE_CROSSCHECK) begin
        if (k < N) begin
          for (int c = 0; c < M; c++) s += cell_i[k][c];
          check(result_kind == RES_ROW && result_row == 2'(k), $sformatf("row test %0d", k));
          check(row_sel == N'(1 << k) && col_sel == '1, "row test selection");
        end else begin
          for (int r = 0; r < N; r++) s += cell_i[r][k - N];
          check(result_kind == RES_COL && result_col == 2'(k - N), $sformatf("column test %0d", k - N));
          check(row_sel == '1 && col_sel == M'(1 << (k - N)), "column test selection");
        end
      end else begin
        s = cell_i[k / M][k % M];
        check(result_kind == RES_CELL && result_row == 2'(k / M) && result_col == 2'(k % M),
              $sformatf("cell test %0d", k));
        check(row_sel == N'(1 << (k / M)) && col_sel == M'(1 << (k % M)), "cell test selection");
      end
      check(longint'(result_current) == s, $sformatf("measured current %0d exp %0d", result_current, s));
      k <= k + 1;
    end
  end

  task automatic run_test(test_mode_t m, int n_tests);
    int m0;
    m0 = n_meas;
    k = 0;
    mode = m;
    start = 1;
    @(posedge clk);
    #1;
    start = 0;
    check(busy, "busy after start");
    wait (done);
    @(posedge clk);
    #1;
    check(!busy, "idle after done");
    check(k == n_tests, $sformatf("number of results %0d", k));
    check(n_meas - m0 == n_tests, $sformatf("number of measurements %0d", n_meas - m0));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; mode = MODE_CROSSCHECK; k = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M; c++) cell_i[r][c] = current_t'(1 << (r * M + c));
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    run_test(MODE_CROSSCHECK, M + N);
    run_test(MODE_NORMAL, M * N);
    run_test(MODE_CROSSCHECK, M + N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
