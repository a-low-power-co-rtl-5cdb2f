// main_control_unit: sequences the co-processor window by window.
//
// Capture side: every filtered sample (in_valid) is written to the ECG RAM at
// (wbank, widx) and widx advances; after the last of WIN_LEN samples the bank
// swaps and win_end pulses, which makes the R-peak detector hand over its
// list.  Processing side: on win_end the completed bank is searched (peak
// delineation), the descriptors are computed, then the DNN classifies; each
// step is started with a one-clock pulse and its done pulse moves the FSM on.
// result_valid pulses with the DNN's done.  The article says only that the
// main control unit controls the two processing blocks; this sequencing, and
// what happens when a window ends while the previous one is still being
// processed (that window is skipped and overrun pulses), are this design's
// choice.  At 12.5 kHz a window lasts 37,500 clocks and its processing about
// 2,000, so an overrun does not occur at the article's clock.
module main_control_unit
  import coap_pkg::*;
#(
  parameter int unsigned WIN = WIN_LEN
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  // ECG RAM write side
  output logic ram_we,
  output logic wbank,
  output idx_t widx,
  output logic rbank,
  // window end, to the R-peak detector
  output logic win_end,
  // processing handshakes
  output logic del_start,
  input  logic del_done,
  output logic desc_start,
  input  logic desc_done,
  output logic dnn_start,
  input  logic dnn_done,
  output logic result_valid,
  output logic overrun,
  output logic busy
);
  typedef enum logic [2:0] {IDLE, LATCH, DELIN, DESC, DNN} state_e;
  state_e state;

  logic last_sample;
  assign ram_we      = in_valid;
  assign last_sample = in_valid && (widx == idx_t'(WIN - 1));
  assign busy        = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank        <= 1'b0;
      widx         <= '0;
      rbank        <= 1'b0;
      win_end      <= 1'b0;
      state        <= IDLE;
      del_start    <= 1'b0;
      desc_start   <= 1'b0;
      dnn_start    <= 1'b0;
      result_valid <= 1'b0;
      overrun      <= 1'b0;
    end else begin
      win_end      <= 1'b0;
      del_start    <= 1'b0;
      desc_start   <= 1'b0;
      dnn_start    <= 1'b0;
      result_valid <= 1'b0;
      overrun      <= 1'b0;
      if (in_valid) begin
        if (last_sample) begin
          widx    <= '0;
          wbank   <= ~wbank;
          win_end <= 1'b1;
        end else begin
          widx <= widx + 1'b1;
        end
      end
      unique case (state)
        IDLE: if (win_end) begin
          rbank <= ~wbank;          // wbank has already swapped
          state <= LATCH;
        end
        LATCH: begin                // the detector's list is now stable
          del_start <= 1'b1;
          state     <= DELIN;
        end
        DELIN: if (del_done) begin
          desc_start <= 1'b1;
          state      <= DESC;
        end
        DESC: if (desc_done) begin
          dnn_start <= 1'b1;
          state     <= DNN;
        end
        DNN: if (dnn_done) begin
          result_valid <= 1'b1;
          state        <= IDLE;
        end
        default: state <= IDLE;
      endcase
      if (win_end && state != IDLE) overrun <= 1'b1;
    end
  end
endmodule
