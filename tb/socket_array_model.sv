// socket_array_model: behavioural model of the socket chip's switch array,
// seen from its I/O pad.
//
// Not synthesizable logic: it stands for the analog array of unit cells
// (three NMOS switches, a test diode and a bump pad per cell).  Given the
// row and column select lines it returns the pad current code, made of the
// addressed detector's dark current and the leakage of every OFF switch on
// the path, as labelled in the four selection cases:
//   column c selected, row r selected:   I_D(r,c) + (ROWS-1)*I_ROFF
//   column c selected, no row selected:  ROWS*I_ROFF
//   column not selected, a row selected: I_COFF
//   column not selected, no row:         I_CROFF
// summed over all columns.  Detector currents come from socket_dark().
module socket_array_model
  import fpa_test_pkg::*;
  import fpa_tb_pkg::*;
#(
  parameter int unsigned ROWS    = 128,
  parameter int unsigned COLS    = 128,
  parameter int          I_ROFF  = 3,
  parameter int          I_COFF  = 5,
  parameter int          I_CROFF = 2
) (
  input  logic [ROWS-1:0] row_sel,
  input  logic [COLS-1:0] col_sel,
  output current_t        pad_current
);

  always_comb begin
    int r_on;
    longint acc;
    r_on = -1;
    for (int r = 0; r < int'(ROWS); r++) if (row_sel[r]) r_on = r;
    acc = 0;
    for (int c = 0; c < int'(COLS); c++) begin
      if (col_sel[c]) begin
        if (r_on >= 0) acc += longint'(socket_dark(r_on, c)) + longint'(ROWS - 1) * I_ROFF;
        else           acc += longint'(ROWS) * I_ROFF;
      end else begin
        acc += (r_on >= 0) ? I_COFF : I_CROFF;
      end
    end
    pad_current = current_t'(acc);
  end

endmodule
