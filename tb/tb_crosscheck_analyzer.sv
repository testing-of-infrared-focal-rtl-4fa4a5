// tb_crosscheck_analyzer: fault detection and location on the four measured
// 4 x 4 cases and on the fault-masking patterns.
//
// Row and column sums are formed here from the cell readings of each case
// (good, open cell(3,2), short cell(4,3)-cell(4,4), open cell(3,2) plus short
// cell(2,1)-cell(3,1); 1-based names) with the short adding the partner's
// current to a line that contains only one of the two cells.  They are fed
// to the analyzer as a crosscheck result stream with a unit current of 95
// and a tolerance of 30.  Expected flags: none; row 3 and column 2 low with
// cell(3,2) located open; columns 3 and 4 high with row 4 masked; row 2 high,
// column 2 low and row 3 masked.  Then an open and a double-current fault in
// one row (row masked, both columns flagged), four faults cancelling in rows
// and columns (nothing detected), two opens on a diagonal (four candidate
// cells), and single-cell results of normal mode.
module tb_crosscheck_analyzer;
  import fpa_test_pkg::*;
  import fpa_tb_pkg::*;

  localparam int M = 4, N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, res_valid;
  current_t unit_current, tolerance, res_current;
  result_kind_t res_kind;
  logic [1:0] res_row, res_col;
  logic [N-1:0] row_low, row_high;
  logic [M-1:0] col_low, col_high;
  logic [N-1:0][M-1:0] open_map, large_map;
  logic fault_detected;
  int checks = 0, failures = 0;

  crosscheck_analyzer #(.M(M), .N(N)) dut (
    .clk, .rst_n, .clear, .unit_current, .tolerance,
    .res_valid, .res_kind, .res_row, .res_col, .res_current,
    .row_low, .row_high, .col_low, .col_high, .open_map, .large_map, .fault_detected);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: rl=%b rh=%b cl=%b ch=%b open=%h large=%h", what,
               row_low, row_high, col_low, col_high, open_map, large_map);
    end
  endtask

  task automatic send(result_kind_t kd, int r, int c, longint cur);
    res_valid = 1; res_kind = kd; res_row = 2'(r); res_col = 2'(c); res_current = current_t'(cur);
    @(posedge clk);
    #1;
    res_valid = 0;
  endtask

  task automatic do_clear();
    clear = 1;
    @(posedge clk);
    #1;
    clear = 0;
    check(!fault_detected && open_map == '0 && large_map == '0, "clear drops all flags");
  endtask

  // Crosscheck sums of a 4 x 4 array with an optional short.
  task automatic crosscheck(current_t v [N][M], bit sh, int ar, int ac, int br, int bc);
    for (int r = 0; r < N; r++) begin
      longint s;
      s = 0;
      for (int c = 0; c < M; c++) s += v[r][c];
      if (sh && (ar == r) != (br == r)) s += (ar == r) ? v[br][bc] : v[ar][ac];
      send(RES_ROW, r, 0, s);
    end
    for (int c = 0; c < M; c++) begin
      longint s;
      s = 0;
      for (int r = 0; r < N; r++) s += v[r][c];
      if (sh && (ac == c) != (bc == c)) s += (ac == c) ? v[br][bc] : v[ar][ac];
      send(RES_COL, 0, c, s);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    current_t v [N][M];
    int ar, ac, br, bc;
    bit sh;
    clear = 0; res_valid = 0; res_kind = RES_ROW; res_row = 0; res_col = 0; res_current = 0;
    unit_current = 95; tolerance = 30;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    // The four measured cases.
    for (int t = 0; t < 4; t++) begin
      do_clear();
      for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) v[r][c] = xc_table(t, r, c);
      sh = xc_short(t, ar, ac, br, bc);
      crosscheck(v, sh, ar, ac, br, bc);
      unique case (t)
        0: check(!fault_detected, "good array: no fault");
        1: begin
          check(row_low == 4'b0100 && col_low == 4'b0010 && row_high == 0 && col_high == 0,
                "open: row 3 and column 2 low");
          check(open_map == 16'(1 << (2 * M + 1)) && large_map == 0, "open: cell(3,2) located");
        end
        2: begin
          check(col_high == 4'b1100 && row_high == 0 && row_low == 0 && col_low == 0,
                "short: columns 3 and 4 high, row 4 masked");
          check(fault_detected && open_map == 0 && large_map == 0, "short: detected, not located");
        end
        default: begin
          check(row_high == 4'b0010 && col_low == 4'b0010 && row_low == 0 && col_high == 0,
                "open+short: row 2 high, column 2 low, row 3 masked");
          check(fault_detected && open_map == 0 && large_map == 0, "open+short: not located");
        end
      endcase
    end
    // Open and double-current fault in one row: the row cancels out.
    do_clear();
    for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) v[r][c] = 95;
    v[1][0] = 0; v[1][2] = 190;
    crosscheck(v, 1'b0, 0, 0, 0, 0);
    check(row_low == 0 && row_high == 0 && col_low == 4'b0001 && col_high == 4'b0100,
          "double fault in one row: row masked, columns detected");
    // Two open cells on a diagonal: all four crossings become candidates.
    do_clear();
    for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) v[r][c] = 95;
    v[0][1] = 0; v[3][2] = 0;
    crosscheck(v, 1'b0, 0, 0, 0, 0);
    check(open_map == 16'((1 << 1) | (1 << 2) | (1 << (3 * M + 1)) | (1 << (3 * M + 2))),
          "two opens: four candidate cells");
    for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) v[r][c] = 95;
    v[1][0] = 0; v[1][2] = 190;
    // Four faults cancelling by row and by column: nothing detected.
    do_clear();
    v[1][0] = 0; v[1][2] = 190; v[2][0] = 190; v[2][2] = 0;
    crosscheck(v, 1'b0, 0, 0, 0, 0);
    check(!fault_detected, "quadruple fault fully masked");
    // Normal mode single-cell results.
    do_clear();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M; c++)
        send(RES_CELL, r, c, (r == 0 && c == 3) ? 0 : (r == 3 && c == 1) ? 400 : 95);
    check(open_map == 16'(1 << 3) && large_map == 16'(1 << (3 * M + 1)), "single-cell faults located");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
