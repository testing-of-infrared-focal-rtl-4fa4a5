// socket_select: pixel selection logic of the test socket chip.
//
// The socket chip contacts every detector of a ROWS x COLS array at once and
// is accessed like a RAM: a row address and a column address pick one
// detector, whose path to the I/O pad is closed through the row switches of
// the addressed row and the column switch of the addressed column.  Two
// control pins can disable the row decoder and the column select separately,
// which gives the four selection cases used to calibrate switch leakage:
//   case 1: row_disable=1, col_disable=1 -> no switch ON
//   case 2: row_disable=1, col_disable=0 -> only the addressed column switch ON
//   case 3: row_disable=0, col_disable=1 -> only the addressed row ON
//   case 4: row_disable=0, col_disable=0 -> normal selection of one pixel
//
// Interface: row_addr/col_addr (binary), row_disable/col_disable (active
// high), row_sel/col_sel one-hot (or zero) lines to the switch array.
// Timing: combinational.  The 128 x 128 size follows the fabricated chip; the
// pin polarity is this design's choice.
module socket_select #(
  parameter int unsigned ROWS = 128,
  parameter int unsigned COLS = 128,
  localparam int unsigned RAW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CAW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic [RAW-1:0]  row_addr,
  input  logic [CAW-1:0]  col_addr,
  input  logic            row_disable,
  input  logic            col_disable,
  output logic [ROWS-1:0] row_sel,
  output logic [COLS-1:0] col_sel
);

  addr_decoder #(.LINES(ROWS)) u_row_decoder (
    .addr      (row_addr),
    .disable_i (row_disable),
    .sel       (row_sel)
  );

  addr_decoder #(.LINES(COLS)) u_col_select (
    .addr      (col_addr),
    .disable_i (col_disable),
    .sel       (col_sel)
  );

endmodule
