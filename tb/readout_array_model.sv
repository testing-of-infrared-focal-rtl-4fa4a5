// readout_array_model: behavioural model of the readout array with built-in
// current sources, seen from its measuring node.
//
// Not synthesizable logic: it stands for the analog unit cells (current
// source, readout circuit, row-select switch) and column-select switches.
// A cell adds its current cell_i[r][c] to the node when its row and its
// column are both selected.  An open fault is a cell current of 0, a
// large-current fault a large cell current.  One short between cells a and b
// can be enabled: when only one of the two is connected it carries both
// currents; when both are connected the sum is unchanged.
module readout_array_model
  import fpa_test_pkg::*;
#(
  parameter int unsigned M = 4,  // columns
  parameter int unsigned N = 4   // rows
) (
  input  logic [N-1:0] row_sel,
  input  logic [M-1:0] col_sel,
  input  current_t     cell_i [N][M],
  input  logic         short_en,
  input  int           short_ar,
  input  int           short_ac,
  input  int           short_br,
  input  int           short_bc,
  output current_t     node_current
);

  always_comb begin
    longint acc;
    logic   a_on, b_on;
    acc = 0;
    for (int r = 0; r < int'(N); r++)
      for (int c = 0; c < int'(M); c++)
        if (row_sel[r] && col_sel[c]) acc += longint'(cell_i[r][c]);
    if (short_en) begin
      a_on = row_sel[short_ar] && col_sel[short_ac];
      b_on = row_sel[short_br] && col_sel[short_bc];
      if (a_on && !b_on) acc += longint'(cell_i[short_br][short_bc]);
      if (b_on && !a_on) acc += longint'(cell_i[short_ar][short_ac]);
    end
    node_current = current_t'(acc);
  end

endmodule
