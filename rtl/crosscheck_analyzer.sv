// crosscheck_analyzer: turns row, column and cell current measurements into a
// failure map.
//
// A good cell draws one unit current (unit_current).  A full-row test of a
// fault-free row therefore reads M units and a full-column test N units; a
// measurement lower than expected by more than tolerance marks the line "low"
// (an open fault removes a cell's current), a higher one marks it "high" (a
// large-current fault or a short to a neighbour adds current).  A cell is
// located as open where a low row crosses a low column and as large-current
// where a high row crosses a high column.  Single-cell measurements of normal
// mode mark the cell directly.  With faults of one kind in several rows and
// columns every crossing is marked, a superset of the faulty cells.
// fault_detected is set by any flag.  Faults of
// opposite kinds in one line can cancel (fault masking): such a line is not
// flagged, and a fault is then detected but possibly not located.
//
// Interface: clear (start of a new test, drops all flags), unit_current and
// tolerance (held during the test), res_* stream from crosscheck_controller;
// flag vectors per row/column and cell maps indexed [row][column].
// Timing: flags update one cycle after res_valid; maps are combinational from
// the flags.
// Expected values (M or N times one cell's current) and the crosscheck of rows
// against columns follow the document; the absolute tolerance and the
// low/high split are this design's choices.
module crosscheck_analyzer
  import fpa_test_pkg::*;
#(
  parameter int unsigned M = 4,  // columns
  parameter int unsigned N = 4,  // rows
  localparam int unsigned RIW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CIW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  current_t              unit_current,
  input  current_t              tolerance,
  input  logic                  res_valid,
  input  result_kind_t          res_kind,
  input  logic [RIW-1:0]        res_row,
  input  logic [CIW-1:0]        res_col,
  input  current_t              res_current,
  output logic [N-1:0]          row_low,
  output logic [N-1:0]          row_high,
  output logic [M-1:0]          col_low,
  output logic [M-1:0]          col_high,
  output logic [N-1:0][M-1:0]   open_map,
  output logic [N-1:0][M-1:0]   large_map,
  output logic                  fault_detected
);

  localparam int unsigned W = CUR_W + $clog2(M + N + 1) + 2;
  typedef logic signed [W-1:0] wide_t;

  logic [N-1:0][M-1:0] cell_low, cell_high;

  wide_t expected, lo_lim, hi_lim, meas;
  logic  is_low, is_high;

  always_comb begin
    unique case (res_kind)
      RES_ROW: expected = wide_t'(unit_current) * wide_t'(M);
      RES_COL: expected = wide_t'(unit_current) * wide_t'(N);
      default: expected = wide_t'(unit_current);
    endcase
    lo_lim  = expected - wide_t'(tolerance);
    hi_lim  = expected + wide_t'(tolerance);
    meas    = wide_t'(res_current);
    is_low  = meas < lo_lim;
    is_high = meas > hi_lim;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_low   <= '0;
      row_high  <= '0;
      col_low   <= '0;
      col_high  <= '0;
      cell_low  <= '0;
      cell_high <= '0;
    end else if (clear) begin
      row_low   <= '0;
      row_high  <= '0;
      col_low   <= '0;
      col_high  <= '0;
      cell_low  <= '0;
      cell_high <= '0;
    end else if (res_valid) begin
      unique case (res_kind)
        RES_ROW: begin
          row_low[res_row]  <= is_low;
          row_high[res_row] <= is_high;
        end
        RES_COL: begin
          col_low[res_col]  <= is_low;
          col_high[res_col] <= is_high;
        end
        default: begin
          cell_low[res_row][res_col]  <= is_low;
          cell_high[res_row][res_col] <= is_high;
        end
      endcase
    end
  end

  always_comb begin
    for (int r = 0; r < int'(N); r++) begin
      for (int c = 0; c < int'(M); c++) begin
        open_map[r][c]  = (row_low[r]  & col_low[c])  | cell_low[r][c];
        large_map[r][c] = (row_high[r] & col_high[c]) | cell_high[r][c];
      end
    end
    fault_detected = |{row_low, row_high, col_low, col_high, cell_low, cell_high};
  end

endmodule
