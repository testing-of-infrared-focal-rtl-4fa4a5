// tb_select_shift_register: random command sequences against a reference.
//
// A 4-stage register (the 4 x 4 readout chip) and a 7-stage one receive the
// same random stream of hold, shift, clear, preset and load commands; a
// reference register kept here predicts every state and the serial output.
// A directed part shifts a single token through all stages, the normal
// readout use.
module tb_select_shift_register;
  import fpa_test_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sr_op_t     op;
  logic       sin;
  logic [6:0] load_val;
  logic [3:0] q4;
  logic [6:0] q7;
  logic       so4, so7;
  logic [3:0] ref4;
  logic [6:0] ref7;
  int checks = 0, failures = 0;

  select_shift_register #(.LEN(4)) dut4 (.clk, .rst_n, .op, .sin, .load_val(load_val[3:0]), .q(q4), .sout(so4));
  select_shift_register #(.LEN(7)) dut7 (.clk, .rst_n, .op, .sin, .load_val(load_val),      .q(q7), .sout(so7));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s op=%s q4=%b ref4=%b q7=%b ref7=%b", what, op.name(), q4, ref4, q7, ref7);
    end
  endtask

  task automatic apply(sr_op_t o, logic s, logic [6:0] lv);
    op = o; sin = s; load_val = lv;
    unique case (o)
      SR_SHIFT:  begin ref4 = {ref4[2:0], s}; ref7 = {ref7[5:0], s}; end
      SR_CLEAR:  begin ref4 = '0; ref7 = '0; end
      SR_PRESET: begin ref4 = '1; ref7 = '1; end
      SR_LOAD:   begin ref4 = lv[3:0]; ref7 = lv; end
      default: ;
    endcase
    @(posedge clk);
    #1;
    check(q4 == ref4 && q7 == ref7, "state");
    check(so4 == ref4[3] && so7 == ref7[6], "serial out");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = SR_HOLD; sin = 0; load_val = 0;
    ref4 = '0; ref7 = '0;
    repeat (2) @(posedge clk);
    #1;
    check(q4 == '0 && q7 == '0, "reset clears");
    rst_n = 1;
    // token walk
    apply(SR_CLEAR, 1'b0, '0);
    apply(SR_SHIFT, 1'b1, '0);
    for (int i = 1; i < 7; i++) begin
      apply(SR_SHIFT, 1'b0, '0);
      check(q7 == 7'(1 << i), "token position");
    end
    // random commands
    for (int n = 0; n < 1000; n++) begin
      sr_op_t o;
      o = sr_op_t'($urandom_range(4, 0));
      apply(o, 1'($urandom), 7'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
