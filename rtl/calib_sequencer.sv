// calib_sequencer: drives the socket chip through the four-case leakage
// calibration of every pixel.
//
// After start, the sequencer visits the pixels row by row (row 0 column 0
// first), or, when single is high with start, only the pixel at
// pix_row/pix_col: the socket chip gives random access to any detector.  For each pixel it applies the address and, in turn, the four
// disable-pin settings of cases 1, 2, 3 and 4; in each case it waits SETTLE
// cycles for the selection to settle, then raises meas_req and holds it until
// the current-measuring instrument answers with meas_ack and the current code.
// When the fourth current is in, it presents I1..I4 with the pixel address on
// cal_* for one cycle (cal_valid) and moves on.  done pulses after the last
// pixel.
//
// Interface: start/single/pix_row/pix_col/busy/done; row_addr, col_addr,
// row_disable, col_disable to socket_select; meas_req/meas_ack/meas_current to the instrument; cal_valid,
// cal_row, cal_col, cal_i1..cal_i4 to leakage_calibrator.
// Timing: per case SETTLE + 1 cycles plus the instrument's answer time; the
// cal_valid cycle overlaps the setup of the next pixel's first case.
// The four cases and their measurement per pixel follow the calibration
// scheme; the scan order, case order, settle time and handshake are this
// design's choices.
module calib_sequencer
  import fpa_test_pkg::*;
#(
  parameter int unsigned ROWS   = 128,
  parameter int unsigned COLS   = 128,
  parameter int unsigned SETTLE = 2,
  localparam int unsigned RAW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CAW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           single,    // with start: calibrate one pixel only
  input  logic [RAW-1:0] pix_row,   // its row (single mode)
  input  logic [CAW-1:0] pix_col,   // its column (single mode)
  output logic           busy,
  output logic           done,
  // to the pixel selection logic
  output logic [RAW-1:0] row_addr,
  output logic [CAW-1:0] col_addr,
  output logic           row_disable,
  output logic           col_disable,
  // to the current-measuring instrument
  output logic           meas_req,
  input  logic           meas_ack,
  input  current_t       meas_current,
  // to the calibration unit
  output logic           cal_valid,
  output logic [RAW-1:0] cal_row,
  output logic [CAW-1:0] cal_col,
  output current_t       cal_i1,
  output current_t       cal_i2,
  output current_t       cal_i3,
  output current_t       cal_i4
);

  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_MEAS} state_t;

  localparam int unsigned CW = $clog2(SETTLE + 1) + 1;

  state_t    state;
  logic      single_r;
  sel_case_t sel_case;
  logic [CW-1:0] settle_cnt;
  current_t  meas [4];

  // Disable pins of the current case.
  always_comb begin
    unique case (sel_case)
      CASE1:   {row_disable, col_disable} = 2'b11;
      CASE2:   {row_disable, col_disable} = 2'b10;
      CASE3:   {row_disable, col_disable} = 2'b01;
      default: {row_disable, col_disable} = 2'b00;
    endcase
  end

  assign busy     = (state != S_IDLE);
  assign meas_req = (state == S_MEAS);
  assign cal_i1   = meas[0];
  assign cal_i2   = meas[1];
  assign cal_i3   = meas[2];
  assign cal_i4   = meas[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      single_r   <= 1'b0;
      sel_case   <= CASE1;
      settle_cnt <= '0;
      row_addr   <= '0;
      col_addr   <= '0;
      cal_row    <= '0;
      cal_col    <= '0;
      cal_valid  <= 1'b0;
      done       <= 1'b0;
      for (int i = 0; i < 4; i++) meas[i] <= '0;
    end else begin
      cal_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            single_r   <= single;
            row_addr   <= single ? pix_row : '0;
            col_addr   <= single ? pix_col : '0;
            sel_case   <= CASE1;
            settle_cnt <= '0;
            state      <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          if (settle_cnt >= CW'(SETTLE)) state <= S_MEAS;
          else settle_cnt <= settle_cnt + 1'b1;
        end
        S_MEAS: begin
          if (meas_ack) begin
            meas[sel_case] <= meas_current;
            settle_cnt     <= '0;
            if (sel_case != CASE4) begin
              sel_case <= sel_case_t'(sel_case + 2'd1);
              state    <= S_SETTLE;
            end else begin
              cal_valid <= 1'b1;
              cal_row   <= row_addr;
              cal_col   <= col_addr;
              sel_case  <= CASE1;
              if (single_r) begin
                done     <= 1'b1;
                state    <= S_IDLE;
              end else if (col_addr == CAW'(COLS - 1)) begin
                col_addr <= '0;
                if (row_addr == RAW'(ROWS - 1)) begin
                  row_addr <= '0;
                  done     <= 1'b1;
                  state    <= S_IDLE;
                end else begin
                  row_addr <= row_addr + 1'b1;
                  state    <= S_SETTLE;
                end
              end else begin
                col_addr <= col_addr + 1'b1;
                state    <= S_SETTLE;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The instrument must not answer a request that was never made.
  ack_only_when_requested: assert property (@(posedge clk) disable iff (!rst_n)
    meas_ack |-> meas_req);

endmodule
