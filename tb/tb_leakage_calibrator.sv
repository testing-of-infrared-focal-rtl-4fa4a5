// tb_leakage_calibrator: checks the leakage-cancelling dark-current formula.
//
// Two instances: 128 x 128 (power-of-two divisor, shift) and 5 x 3 (integer
// division).  Part 1 builds the four case currents from a random dark current
// and random per-switch leakages, the way the switch array produces them, and
// expects the exact dark current back.  Part 2 feeds random currents and
// compares with the weighted sum computed here in 64-bit arithmetic.  The
// approximate output I4-I3-I2+I1 and the one-cycle latency are checked too.
module tb_leakage_calibrator;
  import fpa_test_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     in_valid;
  current_t i1, i2, i3, i4;
  logic [13:0] tag;
  logic     v_a, v_b;
  current_t d_a, d_b, ap_a, ap_b;
  logic [13:0] t_a, t_b;
  int checks = 0, failures = 0;

  leakage_calibrator #(.ROWS(128), .COLS(128), .TAG_W(14)) dut_a (
    .clk, .rst_n, .in_valid, .i1, .i2, .i3, .i4, .in_tag(tag),
    .out_valid(v_a), .i_dark(d_a), .i_dark_approx(ap_a), .out_tag(t_a));
  leakage_calibrator #(.ROWS(5), .COLS(3), .TAG_W(14)) dut_b (
    .clk, .rst_n, .in_valid, .i1, .i2, .i3, .i4, .in_tag(tag),
    .out_valid(v_b), .i_dark(d_b), .i_dark_approx(ap_b), .out_tag(t_b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic longint floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction

  // Reference: ROWS*COLS*I4 - ROWS*(COLS-1)*I3 - COLS*(ROWS-1)*I2 + (ROWS-1)*(COLS-1)*I1
  function automatic longint weighted(longint r, longint c, longint a1, longint a2,
                                      longint a3, longint a4);
    return r * c * a4 - r * (c - 1) * a3 - c * (r - 1) * a2 + (r - 1) * (c - 1) * a1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one input set, then check both instances one cycle later.
  task automatic run(longint e_a, longint e_b, bit exact_a, bit exact_b,
                     longint a1, longint a2, longint a3, longint a4, int t);
    i1 = current_t'(a1); i2 = current_t'(a2); i3 = current_t'(a3); i4 = current_t'(a4);
    tag = 14'(t);
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    check(v_a && v_b, "valid one cycle after input");
    check(t_a == 14'(t) && t_b == 14'(t), "tag");
    if (exact_a) check(longint'(d_a) == e_a, $sformatf("128x128 dark %0d exp %0d", d_a, e_a));
    if (exact_b) check(longint'(d_b) == e_b, $sformatf("5x3 dark %0d exp %0d", d_b, e_b));
    check(longint'(ap_a) == a4 - a3 - a2 + a1, "approximation");
    @(posedge clk);
    #1;
    check(!v_a && !v_b, "valid is a single pulse");
  endtask

  initial begin
    in_valid = 0; i1 = 0; i2 = 0; i3 = 0; i4 = 0; tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    // Part 1: currents formed from a dark current and switch leakages.
    for (int n = 0; n < 300; n++) begin
      longint id, ir, ic, icr;
      longint a1, a2, a3, a4, b1, b2, b3, b4;
      id  = longint'($urandom_range(100000, 0));
      ir  = longint'($urandom_range(50, 0));
      ic  = longint'($urandom_range(50, 0));
      icr = longint'($urandom_range(50, 0));
      // 128 x 128 array
      a4 = id + 127 * ir + 127 * ic;
      a3 = 128 * ic;
      a2 = 128 * ir + 127 * icr;
      a1 = 128 * icr;
      run(id, 0, 1'b1, 1'b0, a1, a2, a3, a4, n);
      check(longint'(ap_a) - id == icr - ir - ic, "approximation error is I_CROFF - I_ROFF - I_COFF");
      // 5 rows x 3 columns
      b4 = id + 4 * ir + 2 * ic;
      b3 = 3 * ic;
      b2 = 5 * ir + 2 * icr;
      b1 = 3 * icr;
      run(0, id, 1'b0, 1'b1, b1, b2, b3, b4, n);
    end
    // Part 2: arbitrary currents, including negative codes.
    for (int n = 0; n < 300; n++) begin
      longint a1, a2, a3, a4;
      a1 = longint'($urandom_range(200000, 0)) - 100000;
      a2 = longint'($urandom_range(200000, 0)) - 100000;
      a3 = longint'($urandom_range(200000, 0)) - 100000;
      a4 = longint'($urandom_range(200000, 0)) - 100000;
      run(floor_div(weighted(128, 128, a1, a2, a3, a4), 16384),
          weighted(5, 3, a1, a2, a3, a4) / 15, 1'b1, 1'b1, a1, a2, a3, a4, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
