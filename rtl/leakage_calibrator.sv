// leakage_calibrator: removes switch leakage from a pixel's dark-current
// measurement.
//
// On the socket chip every OFF switch on the measuring path leaks a little
// current, and with 128 rows and columns the sum is comparable to the dark
// current itself.  Measuring the pad current in the four selection cases
// (I1: nothing selected, I2: column only, I3: row only, I4: the pixel) lets
// the leakage be cancelled:
//     I_D = I4 - k1*I3 - k2*I2 + k1*k2*I1,
//     k1 = (COLS-1)/COLS,  k2 = (ROWS-1)/ROWS.
// To stay in integer arithmetic the unit multiplies through by ROWS*COLS:
//     ROWS*COLS*I_D = ROWS*COLS*I4 - ROWS*(COLS-1)*I3
//                     - COLS*(ROWS-1)*I2 + (ROWS-1)*(COLS-1)*I1
// and divides the result by ROWS*COLS at the end (an arithmetic right shift,
// rounding toward minus infinity, when ROWS*COLS is a power of two; integer
// division, rounding toward zero, otherwise).  It also gives the large-array
// approximation I4 - I3 - I2 + I1 (k1 = k2 = 1).
//
// Interface: in_valid with i1..i4 and a free tag (e.g. the pixel address);
// out_valid with i_dark, i_dark_approx and the tag.
// Timing: one register stage, result one cycle after in_valid; one pixel per
// cycle.  The formula follows the calibration scheme; the integer scaling,
// rounding, tag and latency are this design's choices.
module leakage_calibrator
  import fpa_test_pkg::*;
#(
  parameter int unsigned ROWS  = 128,
  parameter int unsigned COLS  = 128,
  parameter int unsigned TAG_W = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  current_t         i1,
  input  current_t         i2,
  input  current_t         i3,
  input  current_t         i4,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output current_t         i_dark,
  output current_t         i_dark_approx,
  output logic [TAG_W-1:0] out_tag
);

  localparam longint unsigned RC   = longint'(ROWS) * longint'(COLS);
  localparam int unsigned     SH   = $clog2(RC);
  localparam bit              POW2 = (RC == (64'd1 << SH));
  // Room for the weighted sum of four codes, each weight at most ROWS*COLS.
  localparam int unsigned     W    = CUR_W + SH + 3;

  typedef logic signed [W-1:0] wide_t;

  localparam wide_t K4 = wide_t'(RC);
  localparam wide_t K3 = wide_t'(longint'(ROWS) * (longint'(COLS) - 1));
  localparam wide_t K2 = wide_t'(longint'(COLS) * (longint'(ROWS) - 1));
  localparam wide_t K1 = wide_t'((longint'(ROWS) - 1) * (longint'(COLS) - 1));

  wide_t    num;
  wide_t    quo;
  current_t approx;

  always_comb begin
    num = K4 * wide_t'(i4) - K3 * wide_t'(i3) - K2 * wide_t'(i2) + K1 * wide_t'(i1);
    if (POW2) quo = num >>> SH;
    else      quo = num / K4;
    approx = i4 - i3 - i2 + i1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      i_dark        <= '0;
      i_dark_approx <= '0;
      out_tag       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_dark        <= current_t'(quo);
        i_dark_approx <= approx;
        out_tag       <= in_tag;
      end
    end
  end

endmodule
