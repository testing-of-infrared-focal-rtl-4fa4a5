// addr_decoder: binary address decoder with a disable control.
//
// Used as the row decoder and as the column select of the test socket chip.
// The address selects exactly one of LINES output lines (one-hot), like the
// word lines of a RAM.  When disable_i is high the decoder output stays all
// zero even though an address is applied; this is the "slightly modified"
// decoder that the leakage calibration needs to set up its four selection
// cases.  An address at or above LINES selects nothing.
//
// Interface: addr (clog2(LINES) bits), disable_i (active high), sel (LINES bits).
// Timing: purely combinational, as a static address decoder on the chip.
// LINES = 128 follows the 128 x 128 socket chip; the active-high polarity of
// the disable pin is this design's choice.
module addr_decoder #(
  parameter int unsigned LINES = 128,
  localparam int unsigned AW = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic [AW-1:0]    addr,
  input  logic             disable_i,
  output logic [LINES-1:0] sel
);

  always_comb begin
    sel = '0;
    if (!disable_i) begin
      for (int unsigned i = 0; i < LINES; i++) begin
        if (addr == AW'(i)) sel[i] = 1'b1;
      end
    end
  end

endmodule
