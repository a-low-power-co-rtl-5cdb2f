// descriptor_processor: turns the fiducial points of a window into the six
// descriptors fed to the classifier.
//
// Per beat b (indices in samples, values carried in Q.6 in 32-bit words):
//   QRS_b = S - Q       RT_b = T - R       PS_b = S - P
//   iCEB_b = (T - Q) / (S - Q)           (QT/QRS measured between peaks)
// and over the n beats of the window (division by n with div_by_n):
//   QRS_m = mean(QRS)/16        RT_m = mean(RT)/16       PS_m = mean(PS)/16
//   RT_var = mean((RT_b - mean(RT))^2)/64
//   iCEB_m = mean(iCEB)         iCEB_var = mean((iCEB_b - iCEB_m)^2)
// The threshold divisions 16 and 64 are right shifts.  The FSM follows the
// order the article gives: differences, sums, means, then the variances.
// Choices of this design: intervals are taken as positive durations (later
// peak minus earlier peak); the variance of RT uses the unscaled mean, as the
// data path figure draws it; the iCEB ratio keeps 6 fraction bits; results
// saturate to 16 bits; a window with no usable beat gives all zeros.
// Timing: pulse start with beats/n_beats stable; done is high after
// exactly 34 clocks per beat (the ratio uses a bit-serial divider) plus 5.
module descriptor_processor
  import coap_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  beat_t            beats [MAX_BEATS],
  input  logic [CNT_W-1:0] n_beats,
  output q_t               desc [N_IN],
  output logic             done
);
  typedef logic [31:0] w_t;
  typedef enum logic [2:0] {IDLE, DIFF, DIVW, SUM, MEAN, VSUM, VMEAN} state_e;

  state_e           state;
  logic [CNT_W-1:0] b;
  w_t qrs_a [MAX_BEATS], rt_a [MAX_BEATS], ps_a [MAX_BEATS], iceb_a [MAX_BEATS];
  w_t s_qrs, s_rt, s_ps, s_iceb;          // sums, reused for the variance sums
  w_t m_rt, m_iceb;                       // means kept for the variances
  w_t d_qrs, d_rt, d_ps, d_iceb;          // div_by_n outputs

  // Per-beat differences of the beat being processed.
  beat_t bt;
  w_t    qt_q6, qrs_int;
  assign bt      = beats[b[1:0]];
  assign qrs_int = w_t'(bt.s) - w_t'(bt.q);
  assign qt_q6   = w_t'(bt.t) - w_t'(bt.q) << 6;

  logic div_start, div_done;
  w_t   div_q;
  seq_divider #(.W(32)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(qt_q6), .divisor(qrs_int),
    .quot(div_q), .busy(), .done(div_done)
  );
  assign div_start = (state == DIFF);

  div_by_n #(.W(32)) u_n_qrs  (.x(s_qrs),  .n(n_beats), .q(d_qrs));
  div_by_n #(.W(32)) u_n_rt   (.x(s_rt),   .n(n_beats), .q(d_rt));
  div_by_n #(.W(32)) u_n_ps   (.x(s_ps),   .n(n_beats), .q(d_ps));
  div_by_n #(.W(32)) u_n_iceb (.x(s_iceb), .n(n_beats), .q(d_iceb));

  // Sums over the used beats.
  w_t                 sum_qrs, sum_rt, sum_ps, sum_iceb, vsum_rt, vsum_iceb;
  logic signed [32:0] e_rt  [MAX_BEATS], e_ic  [MAX_BEATS];
  logic signed [65:0] sq_rt [MAX_BEATS], sq_ic [MAX_BEATS];
  always_comb begin
    sum_qrs = '0; sum_rt = '0; sum_ps = '0; sum_iceb = '0;
    vsum_rt = '0; vsum_iceb = '0;
    for (int i = 0; i < int'(MAX_BEATS); i++) begin
      e_rt[i]  = $signed({1'b0, rt_a[i]})   - $signed({1'b0, m_rt});
      e_ic[i]  = $signed({1'b0, iceb_a[i]}) - $signed({1'b0, m_iceb});
      sq_rt[i] = e_rt[i] * e_rt[i];
      sq_ic[i] = e_ic[i] * e_ic[i];
      if (CNT_W'(i) < n_beats) begin
        sum_qrs   += qrs_a[i];
        sum_rt    += rt_a[i];
        sum_ps    += ps_a[i];
        sum_iceb  += iceb_a[i];
        vsum_rt   += w_t'(sq_rt[i] >>> 6);  // Q.12 -> Q.6
        vsum_iceb += w_t'(sq_ic[i] >>> 6);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      b     <= '0;
      done  <= 1'b0;
      s_qrs <= '0; s_rt <= '0; s_ps <= '0; s_iceb <= '0;
      m_rt <= '0; m_iceb <= '0;
      for (int i = 0; i < int'(MAX_BEATS); i++) begin
        qrs_a[i] <= '0; rt_a[i] <= '0; ps_a[i] <= '0; iceb_a[i] <= '0;
      end
      for (int i = 0; i < int'(N_IN); i++) desc[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          b     <= '0;
          state <= (n_beats == '0) ? SUM : DIFF;
        end
        // State 1: differences of the peaks (the ratio runs on the divider).
        DIFF: begin
          qrs_a[b[1:0]] <= w_t'(bt.s) - w_t'(bt.q) << 6;
          rt_a[b[1:0]]  <= w_t'(bt.t) - w_t'(bt.r) << 6;
          ps_a[b[1:0]]  <= w_t'(bt.s) - w_t'(bt.p) << 6;
          state         <= DIVW;
        end
        DIVW: if (div_done) begin
          iceb_a[b[1:0]] <= div_q;
          b              <= b + 1'b1;
          state          <= (b + 1'b1 >= n_beats) ? SUM : DIFF;
        end
        // State 2: summation.
        SUM: begin
          s_qrs  <= sum_qrs;
          s_rt   <= sum_rt;
          s_ps   <= sum_ps;
          s_iceb <= sum_iceb;
          state  <= MEAN;
        end
        // State 3: means, then the threshold shifts.
        MEAN: begin
          m_rt   <= d_rt;
          m_iceb <= d_iceb;
          desc[D_QRS_M]  <= sat16(48'(d_qrs >> 4));
          desc[D_RT_M]   <= sat16(48'(d_rt >> 4));
          desc[D_PS_M]   <= sat16(48'(d_ps >> 4));
          desc[D_ICEB_M] <= sat16(48'(d_iceb));
          state <= VSUM;
        end
        // Variances: squared deviations from the means, summed.
        VSUM: begin
          s_rt   <= vsum_rt;
          s_iceb <= vsum_iceb;
          state  <= VMEAN;
        end
        VMEAN: begin
          desc[D_RT_VAR]   <= sat16(48'(d_rt >> 6));
          desc[D_ICEB_VAR] <= sat16(48'(d_iceb));
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
