// tb_socket_select: checks the four selection cases of the socket chip.
//
// For random row and column addresses of the 128 x 128 selection logic, each
// of the four disable-pin settings is applied and the select lines compared
// with the expected lines: no line (case 1), the addressed column only
// (case 2), the addressed row only (case 3), both (case 4).  Each case is
// also checked through the pad current of the switch-array model against the
// leakage sums worked out here.
module tb_socket_select;
  import fpa_test_pkg::*;
  import fpa_tb_pkg::*;

  localparam int R = 128, C = 128;
  localparam int IR = 3, IC = 5, ICR = 2;

  logic [6:0]   row_addr, col_addr;
  logic         row_dis, col_dis;
  logic [R-1:0] row_sel;
  logic [C-1:0] col_sel;
  current_t     pad;
  int checks = 0, failures = 0;

  socket_select #(.ROWS(R), .COLS(C)) dut (
    .row_addr, .col_addr, .row_disable(row_dis), .col_disable(col_dis),
    .row_sel, .col_sel
  );

  socket_array_model #(.ROWS(R), .COLS(C), .I_ROFF(IR), .I_COFF(IC), .I_CROFF(ICR)) u_array (
    .row_sel, .col_sel, .pad_current(pad)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s row=%0d col=%0d dis=%b%b", what, row_addr, col_addr, row_dis, col_dis);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      int r, c;
      r = (n < 2) ? n * 127 : int'($urandom_range(R - 1, 0));
      c = (n < 2) ? 127 - n * 127 : int'($urandom_range(C - 1, 0));
      row_addr = 7'(r);
      col_addr = 7'(c);
      for (int k = 0; k < 4; k++) begin
        longint exp_i;
        {row_dis, col_dis} = (k == 0) ? 2'b11 : (k == 1) ? 2'b10 : (k == 2) ? 2'b01 : 2'b00;
        #1;
        check(row_sel == (row_dis ? '0 : (R'(1) << r)), "row lines");
        check(col_sel == (col_dis ? '0 : (C'(1) << c)), "column lines");
        unique case (k)
          0: exp_i = longint'(C) * ICR;
          1: exp_i = longint'(R) * IR + longint'(C - 1) * ICR;
          2: exp_i = longint'(C) * IC;
          default: exp_i = longint'(socket_dark(r, c)) + longint'(R - 1) * IR + longint'(C - 1) * IC;
        endcase
        check(longint'(pad) == exp_i, "pad current");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
