// select_shift_register: row or column selection register of the readout chip.
//
// The readout chip addresses its cells with one shift register for the rows
// and one for the columns; each stage drives the MOS select switch of its
// line.  In normal readout a single ON stage (a token) is shifted along, so
// one row and one column, hence one cell, are selected at a time.  For the
// crosscheck test the register must also be able to turn every line ON at
// once (preset), turn every line OFF (clear) and take a pattern (load).
//
// Commands (op, see fpa_test_pkg::sr_op_t):
//   SR_HOLD   keep contents
//   SR_SHIFT  q <= {q[LEN-2:0], sin}; sout is the last stage
//   SR_CLEAR  q <= 0
//   SR_PRESET q <= all ones
//   SR_LOAD   q <= load_val
// Timing: one command per clock, result visible after the clock edge.
// Asynchronous active-low reset clears the register (nothing selected).
// Clear, preset and load follow the crosscheck requirements; the command
// encoding, shift direction and reset are this design's choices.
module select_shift_register
  import fpa_test_pkg::*;
#(
  parameter int unsigned LEN = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  sr_op_t         op,
  input  logic           sin,
  input  logic [LEN-1:0] load_val,
  output logic [LEN-1:0] q,
  output logic           sout
);

  logic [LEN-1:0] shifted;

  generate
    if (LEN > 1) begin : g_multi
      assign shifted = {q[LEN-2:0], sin};
    end else begin : g_single
      assign shifted = sin;
    end
  endgenerate

  assign sout = q[LEN-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      unique case (op)
        SR_SHIFT:  q <= shifted;
        SR_CLEAR:  q <= '0;
        SR_PRESET: q <= '1;
        SR_LOAD:   q <= load_val;
        default:   q <= q;
      endcase
    end
  end

endmodule
