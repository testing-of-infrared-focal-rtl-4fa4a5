// fpa_tb_pkg: reference data and helpers shared by the testbenches.
//
// socket_dark() gives every detector of the socket model a dark current code:
// a base value plus a deterministic pattern, with a few pixels carrying a
// large dark current.  xc_table() holds the four measured 4 x 4 readout
// arrays used as test cases (good, open fault, short fault, open + short),
// in units of 10 nA (0.95 uA -> 95), with the fault set-up of each case.
package fpa_tb_pkg;
  import fpa_test_pkg::*;

  function automatic current_t socket_dark(int r, int c);
    int h;
    h = ((r * 37) ^ (c * 11) ^ ((r + c) * 5)) & 63;
    if (((r * 7 + c * 3) % 97) == 13) return current_t'(5000 + h);  // defective
    return current_t'(200 + h);
  endfunction

  // Cell readings of the four 4 x 4 test cases, [row][column], 0-based.
  function automatic current_t xc_table(int t, int r, int c);
    int v [4][4][4];
    v[0] = '{'{95, 94, 92, 94}, '{96, 95, 93, 95}, '{94, 94, 95, 94}, '{97, 96, 95, 96}};
    v[1] = '{'{96, 96, 92, 95}, '{96, 96, 92, 94}, '{95,  0, 94, 95}, '{98, 95, 93, 95}};
    v[2] = '{'{96, 94, 93, 95}, '{96, 94, 94, 95}, '{95, 94, 95, 95}, '{96, 95, 96, 96}};
    v[3] = '{'{95, 94, 93, 95}, '{95, 95, 93, 95}, '{95,  0, 95, 94}, '{96, 95, 94, 95}};
    return current_t'(v[t][r][c]);
  endfunction

  // Short of each case: enable, cell a (row, col), cell b (row, col).
  function automatic logic xc_short(int t, output int ar, output int ac,
                                           output int br, output int bc);
    ar = 0; ac = 0; br = 0; bc = 0;
    if (t == 2) begin ar = 3; ac = 2; br = 3; bc = 3; return 1'b1; end  // cell(4,3)-cell(4,4)
    if (t == 3) begin ar = 1; ac = 0; br = 2; bc = 0; return 1'b1; end  // cell(2,1)-cell(3,1)
    return 1'b0;
  endfunction

endpackage
