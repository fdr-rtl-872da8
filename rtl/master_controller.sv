// master_controller: timing of acquisition and readout for the row logic.
//
// Acquisition (acquire high): Hold toggles every HOLD_CYCLES clocks, so each
// level lasts one sampling interval (150 ns in the document; 15 cycles of an
// assumed 100 MHz clock). Every Hold toggle advances the 13-bit timecode, which
// restarts from zero at the start of each acquisition, so the first sample is
// stamped 1. SETTLE_CYCLES after each toggle a one-cycle sample_strobe tells the
// rows to write the hits just latched. The remaining cycles of the interval
// must cover the up to seven bank writes of a row.
//
// Readout (readout_start pulse while idle): the controller holds `reading`
// high, during which the column readouts pop the stored words, until no row
// memory holds data; it then returns to idle and pulses readout_done.
//
// From the document: Hold toggling every 150 ns (instead of short pulses), the
// timecode, and a readout that reports the timecode, bank and pattern of every
// stored hit. The state machine and the clock rate are this design's choices.
module master_controller
  import fdr_pkg::*;
#(
  parameter int unsigned HOLD_CYCLES   = 15,
  parameter int unsigned SETTLE_CYCLES = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            acquire,          // bunch train in progress
  input  logic            readout_start,    // begin readout (pulse)
  input  logic            data_stored,      // any row memory holds data
  input  logic            write_busy,       // any row still writing
  output logic            hold,
  output timecode_t       timecode,
  output logic            sample_strobe,
  output logic            reading,          // readout state
  output logic            readout_done
);

  typedef enum logic [1:0] {S_IDLE, S_ACQ, S_READ} state_t;
  state_t state;

  localparam int unsigned CW = $clog2(HOLD_CYCLES + 1);
  logic [CW-1:0] hold_cnt;
  logic [CW-1:0] settle_cnt;
  logic          settle_run;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      hold          <= 1'b0;
      timecode      <= '0;
      hold_cnt      <= '0;
      settle_cnt    <= '0;
      settle_run    <= 1'b0;
      sample_strobe <= 1'b0;
      readout_done  <= 1'b0;
    end else begin
      sample_strobe <= 1'b0;
      readout_done  <= 1'b0;
      if (settle_run) begin
        if (settle_cnt == CW'(SETTLE_CYCLES - 1)) begin
          settle_run    <= 1'b0;
          sample_strobe <= 1'b1;
        end
        settle_cnt <= settle_cnt + 1'b1;
      end
      unique case (state)
        S_IDLE: begin
          if (acquire) begin
            state    <= S_ACQ;
            timecode <= '0;
            hold_cnt <= '0;
          end else if (readout_start) begin
            state <= S_READ;
          end
        end
        S_ACQ: begin
          if (hold_cnt == CW'(HOLD_CYCLES - 1)) begin
            hold_cnt   <= '0;
            hold       <= ~hold;
            timecode   <= timecode + 1'b1;
            settle_run <= 1'b1;
            settle_cnt <= '0;
          end else begin
            hold_cnt <= hold_cnt + 1'b1;
          end
          if (!acquire && !settle_run && !sample_strobe && !write_busy &&
              hold_cnt != CW'(HOLD_CYCLES - 1))
            state <= S_IDLE;
        end
        S_READ: begin
          if (!data_stored) begin
            state        <= S_IDLE;
            readout_done <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign reading = (state == S_READ);

  a_hold_period: assert property (@(posedge clk) disable iff (!rst_n)
                                  1'b1 |-> (HOLD_CYCLES > SETTLE_CYCLES + NBANKS))
    else $error("master_controller: sampling interval too short for the bank writes");

endmodule
