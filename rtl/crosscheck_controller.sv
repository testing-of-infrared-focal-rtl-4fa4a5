// crosscheck_controller: runs the readout-chip test through the row and
// column selection shift registers.
//
// Crosscheck mode (M + N tests): for each row j, the row register holds a
// single token on row j and the column register is preset (all columns ON),
// so the whole row is measured in one test; then for each column i, the row
// register is preset and the column register holds a token on column i.
// Normal mode (M * N tests): a token in each register selects one cell; the
// column token walks along the row, then the row token steps and the column
// token is reloaded at column 0.
// The first token of a pass is placed with SR_LOAD and moved with SR_SHIFT;
// the registers must therefore be wired with load pattern 1 (line 0 only)
// and serial input 0.  All lines are turned ON with SR_PRESET.  Rows are
// tested before columns.
//
// Each test: one SEL cycle in which the register commands are issued, then
// meas_req is held until the instrument returns meas_ack with the current
// code.  That cycle the measurement is reported on result_* (result_valid):
// its kind (row, column or cell), row index and column index.  done pulses
// after the last test; start is taken only when idle.
// Interface: M columns, N rows (the document's M x N convention).
// Timing: a test takes 1 cycle plus the instrument's answer time (>= 1 cycle).
// The test sequences follow the crosscheck scheme; the order, the handshake
// and the command timing are this design's choices.
module crosscheck_controller
  import fpa_test_pkg::*;
#(
  parameter int unsigned M = 4,  // columns
  parameter int unsigned N = 4,  // rows
  localparam int unsigned RIW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CIW = (M > 1) ? $clog2(M) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  test_mode_t     mode,
  output logic           busy,
  output logic           done,
  // row and column shift register commands
  output sr_op_t         row_op,
  output sr_op_t         col_op,
  // instrument
  output logic           meas_req,
  input  logic           meas_ack,
  input  current_t       meas_current,
  // results
  output logic           result_valid,
  output result_kind_t   result_kind,
  output logic [RIW-1:0] result_row,
  output logic [CIW-1:0] result_col,
  output current_t       result_current
);

  typedef enum logic [1:0] {S_IDLE, S_SEL, S_MEAS} state_t;
  typedef enum logic [1:0] {P_ROWS, P_COLS, P_CELLS} phase_t;

  state_t         state;
  phase_t         phase;
  logic           first;     // next SEL starts a pass (token must be loaded)
  logic [RIW-1:0] ridx;
  logic [CIW-1:0] cidx;

  logic last_row, last_col;
  assign last_row = (ridx == RIW'(N - 1));
  assign last_col = (cidx == CIW'(M - 1));

  assign busy     = (state != S_IDLE);
  assign meas_req = (state == S_MEAS);

  // Register commands, issued in the SEL cycle.
  always_comb begin
    row_op = SR_HOLD;
    col_op = SR_HOLD;
    if (state == S_SEL) begin
      unique case (phase)
        P_ROWS: begin
          row_op = first ? SR_LOAD : SR_SHIFT;
          col_op = first ? SR_PRESET : SR_HOLD;
        end
        P_COLS: begin
          row_op = first ? SR_PRESET : SR_HOLD;
          col_op = first ? SR_LOAD : SR_SHIFT;
        end
        default: begin  // P_CELLS
          if (first) begin
            row_op = SR_LOAD;
            col_op = SR_LOAD;
          end else if (cidx == '0) begin
            row_op = SR_SHIFT;
            col_op = SR_LOAD;
          end else begin
            col_op = SR_SHIFT;
          end
        end
      endcase
    end
  end

  always_comb begin
    result_valid   = (state == S_MEAS) && meas_ack;
    result_current = meas_current;
    result_row     = ridx;
    result_col     = cidx;
    unique case (phase)
      P_ROWS:  result_kind = RES_ROW;
      P_COLS:  result_kind = RES_COL;
      default: result_kind = RES_CELL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase <= P_ROWS;
      first <= 1'b1;
      ridx  <= '0;
      cidx  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            phase <= (mode == MODE_CROSSCHECK) ? P_ROWS : P_CELLS;
            first <= 1'b1;
            ridx  <= '0;
            cidx  <= '0;
            state <= S_SEL;
          end
        end
        S_SEL: begin
          first <= 1'b0;
          state <= S_MEAS;
        end
        S_MEAS: begin
          if (meas_ack) begin
            state <= S_SEL;
            unique case (phase)
              P_ROWS: begin
                if (last_row) begin
                  phase <= P_COLS;
                  first <= 1'b1;
                  ridx  <= '0;
                end else begin
                  ridx <= ridx + 1'b1;
                end
              end
              P_COLS: begin
                if (last_col) begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                  cidx  <= '0;
                end else begin
                  cidx <= cidx + 1'b1;
                end
              end
              default: begin
                if (last_col) begin
                  cidx <= '0;
                  if (last_row) begin
                    ridx  <= '0;
                    state <= S_IDLE;
                    done  <= 1'b1;
                  end else begin
                    ridx <= ridx + 1'b1;
                  end
                end else begin
                  cidx <= cidx + 1'b1;
                end
              end
            endcase
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  ack_only_when_requested: assert property (@(posedge clk) disable iff (!rst_n)
    meas_ack |-> meas_req);

endmodule
