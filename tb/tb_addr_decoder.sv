// tb_addr_decoder: exhaustive check of the address decoder with disable.
//
// Two instances: the 128-line decoder of the socket chip and a 5-line one
// (addresses 5..7 must select nothing).  Every address is applied with the
// disable pin low and high; the expected one-hot pattern is built here with
// a shift.
module tb_addr_decoder;

  logic [6:0]   a128;
  logic         d128;
  logic [127:0] s128;
  logic [2:0]   a5;
  logic         d5;
  logic [4:0]   s5;
  int checks = 0, failures = 0;

  addr_decoder #(.LINES(128)) dut128 (.addr(a128), .disable_i(d128), .sel(s128));
  addr_decoder #(.LINES(5))   dut5   (.addr(a5),   .disable_i(d5),   .sel(s5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dis = 0; dis < 2; dis++) begin
      for (int a = 0; a < 128; a++) begin
        logic [127:0] exp;
        a128 = 7'(a);
        d128 = 1'(dis);
        #1;
        exp = dis ? '0 : (128'(1) << a);
        checks++;
        if (s128 !== exp) begin
          failures++;
          $display("FAIL 128-line addr=%0d dis=%0d sel=%h", a, dis, s128);
        end
      end
      for (int a = 0; a < 8; a++) begin
        logic [4:0] exp;
        a5 = 3'(a);
        d5 = 1'(dis);
        #1;
        exp = (dis || a >= 5) ? '0 : 5'(1 << a);
        checks++;
        if (s5 !== exp) begin
          failures++;
          $display("FAIL 5-line addr=%0d dis=%0d sel=%b", a, dis, s5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
