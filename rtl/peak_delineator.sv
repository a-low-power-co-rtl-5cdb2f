// peak_delineator: locates the Q, S, P and T peaks of every beat of a window.
//
// Only peaks are delineated, never wave boundaries.  For each R peak found
// on the stream, the stored window is scanned in the ECG RAM:
//   Q = first minimum in [R - Q_SPAN, R - 1]
//   S = first minimum in [R + 1, R + S_SPAN]
//   P = first maximum in [Q - P_SPAN, Q - 1]
//   T = first maximum in [S + 1, S + T_SPAN]
// (the comparators and the Max/Min units of the article's figure; the span
// lengths are this design's choice).  A beat is used only if all four spans
// lie inside the window, so that at most four complete beats remain.
// Each scan reads one sample per clock; the RAM has one clock of read
// latency, so a span of L samples takes L + 1 clocks and a complete beat
// Q_SPAN + S_SPAN + P_SPAN + T_SPAN + 6 clocks.  Pulse start with the
// R list; done pulses when beats[0 .. n_beats-1] are valid.
module peak_delineator
  import coap_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  idx_t             r_idx [MAX_BEATS],
  input  logic [CNT_W-1:0] r_cnt,
  // ECG RAM read port
  output idx_t             raddr,
  input  q_t               rdata,
  // result
  output beat_t            beats [MAX_BEATS],
  output logic [CNT_W-1:0] n_beats,
  output logic             done
);
  typedef enum logic [2:0] {IDLE, CHECK, SCAN_Q, SCAN_S, SCAN_P, SCAN_T, NEXT} state_e;

  state_e           state;
  logic [CNT_W-1:0] bi;          // beat being delineated
  idx_t             r_cur, q_cur, s_cur;
  idx_t             addr, last;  // scan address and last address of the span
  logic             rd_v;        // rdata belongs to a read issued last clock
  idx_t             rd_a;
  logic             issuing;
  q_t               best;
  idx_t             best_a;
  logic             have;
  logic             find_max;

  assign raddr    = addr;
  assign find_max = (state == SCAN_P) || (state == SCAN_T);

  // Does the next sample improve on the best so far?
  logic better;
  always_comb begin
    if (!have)        better = 1'b1;
    else if (find_max) better = rdata > best;
    else               better = rdata < best;
  end

  logic in_win;
  always_comb begin
    in_win = (32'(r_idx[bi[1:0]]) >= Q_SPAN + P_SPAN) &&
             (32'(r_idx[bi[1:0]]) + S_SPAN + T_SPAN <= WIN_LEN - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      bi      <= '0;
      r_cur   <= '0;
      q_cur   <= '0;
      s_cur   <= '0;
      addr    <= '0;
      last    <= '0;
      rd_v    <= 1'b0;
      rd_a    <= '0;
      issuing <= 1'b0;
      best    <= '0;
      best_a  <= '0;
      have    <= 1'b0;
      n_beats <= '0;
      done    <= 1'b0;
      for (int i = 0; i < int'(MAX_BEATS); i++) beats[i] <= '0;
    end else begin
      done <= 1'b0;
      // Read pipeline: an issued address returns data one clock later.
      rd_v <= issuing;
      rd_a <= addr;
      if (issuing) begin
        if (addr == last) issuing <= 1'b0;
        else              addr    <= addr + 1'b1;
      end
      if (rd_v && (state inside {SCAN_Q, SCAN_S, SCAN_P, SCAN_T})) begin
        if (better) begin
          best   <= rdata;
          best_a <= rd_a;
        end
        have <= 1'b1;
      end

      unique case (state)
        IDLE: if (start) begin
          bi      <= '0;
          n_beats <= '0;
          state   <= CHECK;
        end
        CHECK: begin
          if (bi >= r_cnt || bi >= CNT_W'(MAX_BEATS)) begin
            state <= IDLE;
            done  <= 1'b1;
          end else if (!in_win) begin
            bi <= bi + 1'b1;
          end else begin
            r_cur   <= r_idx[bi[1:0]];
            addr    <= r_idx[bi[1:0]] - idx_t'(Q_SPAN);
            last    <= r_idx[bi[1:0]] - 1'b1;
            issuing <= 1'b1;
            have    <= 1'b0;
            state   <= SCAN_Q;
          end
        end
        SCAN_Q: if (rd_v && !issuing && (rd_a == last)) begin
          q_cur   <= better ? rd_a : best_a;
          addr    <= r_cur + 1'b1;
          last    <= r_cur + idx_t'(S_SPAN);
          issuing <= 1'b1;
          have    <= 1'b0;
          state   <= SCAN_S;
        end
        SCAN_S: if (rd_v && !issuing && (rd_a == last)) begin
          s_cur   <= better ? rd_a : best_a;
          addr    <= q_cur - idx_t'(P_SPAN);
          last    <= q_cur - 1'b1;
          issuing <= 1'b1;
          have    <= 1'b0;
          state   <= SCAN_P;
        end
        SCAN_P: if (rd_v && !issuing && (rd_a == last)) begin
          beats[n_beats[1:0]].p <= better ? rd_a : best_a;
          beats[n_beats[1:0]].q <= q_cur;
          beats[n_beats[1:0]].r <= r_cur;
          beats[n_beats[1:0]].s <= s_cur;
          addr    <= s_cur + 1'b1;
          last    <= s_cur + idx_t'(T_SPAN);
          issuing <= 1'b1;
          have    <= 1'b0;
          state   <= SCAN_T;
        end
        SCAN_T: if (rd_v && !issuing && (rd_a == last)) begin
          beats[n_beats[1:0]].t <= better ? rd_a : best_a;
          state <= NEXT;
        end
        NEXT: begin
          n_beats <= n_beats + 1'b1;
          bi      <= bi + 1'b1;
          state   <= CHECK;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
