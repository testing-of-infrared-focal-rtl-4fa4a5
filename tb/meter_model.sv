// meter_model: behavioural model of the current-measuring instrument.
//
// Answers a held request (req) after 1..MAX_LAT clock cycles, chosen at
// random per request, with a one-cycle ack carrying the input current
// sampled in that cycle.  It counts the measurements it made.
module meter_model
  import fpa_test_pkg::*;
#(
  parameter int unsigned MAX_LAT = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req,
  input  current_t current_in,
  output logic     ack,
  output current_t current_out,
  output int       n_meas
);

  int wait_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack         <= 1'b0;
      current_out <= '0;
      wait_cnt    <= 0;
      n_meas      <= 0;
    end else begin
      ack <= 1'b0;
      if (req && !ack) begin
        if (wait_cnt == 0) begin
          wait_cnt <= 1 + int'($urandom_range(MAX_LAT - 1, 0));
        end else if (wait_cnt == 1) begin
          ack         <= 1'b1;
          current_out <= current_in;
          n_meas      <= n_meas + 1;
          wait_cnt    <= 0;
        end else begin
          wait_cnt <= wait_cnt - 1;
        end
      end
    end
  end

endmodule
