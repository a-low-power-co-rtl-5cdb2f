// r_peak_detector: finds the R peaks of a window on the filtered sample stream.
//
// Per sample the detector forms the first difference ECG_d = x[n] - x[n-1]
// and the second difference ECG_dd = ECG_d[n] - ECG_d[n-1], as the
// article's architecture figure shows.  A local maximum sits at n-1 when
// ECG_d crosses from positive to zero or negative (the zero crossing).  It is
// accepted as an R peak when its curvature -ECG_dd is at least a quarter
// (>> 2) of the running maximum amplitude, kept by a register and a
// comparator: the sharp R wave passes, the broad P and T waves do not.
// How the threshold is formed (running maximum halved at each window start
// so it can follow a falling amplitude) and the 200 ms refractory period
// after an accepted peak are this design's choices.
// Up to MAX_BEATS peaks per window are recorded.  When win_end is pulsed
// (with or after the last sample of the window) the recorded indices are
// copied to r_idx/r_cnt and the list restarts for the next window.
// Interface: in_valid/x/idx give one sample and its index in the window.
module r_peak_detector
  import coap_pkg::*;
#(
  parameter int unsigned THR_SHIFT  = 2,
  parameter int unsigned REFRACTORY = 50
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  q_t               x,
  input  idx_t             idx,
  input  logic             win_end,
  output idx_t             r_idx [MAX_BEATS],
  output logic [CNT_W-1:0] r_cnt,
  output logic             peak_pulse
);
  localparam int unsigned RW = $clog2(REFRACTORY + 1);
  typedef logic signed [DATA_W+1:0] d_t;   // two extra bits for the differences

  q_t               x_prev, amp_max;
  d_t               d_prev, d, dd;
  logic             zero_cross, curv_ok, hit;
  logic [RW-1:0]    refr;
  idx_t             list [MAX_BEATS];
  logic [CNT_W-1:0] cnt;
  logic             primed;

  always_comb begin
    d          = d_t'(x) - d_t'(x_prev);
    dd         = d - d_prev;
    zero_cross = (d_prev > 0) && (d <= 0);
    curv_ok    = (-dd) >= (d_t'(amp_max) >>> THR_SHIFT);
    hit        = in_valid && primed && zero_cross && curv_ok && (refr == '0) && (idx != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_prev     <= '0;
      d_prev     <= '0;
      amp_max    <= '0;
      refr       <= '0;
      cnt        <= '0;
      primed     <= 1'b0;
      r_cnt      <= '0;
      peak_pulse <= 1'b0;
      for (int i = 0; i < int'(MAX_BEATS); i++) begin
        list[i]  <= '0;
        r_idx[i] <= '0;
      end
    end else begin
      peak_pulse <= 1'b0;
      if (in_valid) begin
        x_prev <= x;
        d_prev <= d;
        primed <= 1'b1;
        if (x > amp_max) amp_max <= x;
        if (refr != '0) refr <= refr - 1'b1;
        if (hit) begin
          refr       <= RW'(REFRACTORY);
          peak_pulse <= 1'b1;
          if (cnt < CNT_W'(MAX_BEATS)) begin
            list[cnt[1:0]] <= idx - 1'b1;   // the maximum was the previous sample
            cnt            <= cnt + 1'b1;
          end
        end
      end
      if (win_end) begin
        r_idx   <= list;
        r_cnt   <= cnt;
        cnt     <= '0;
        amp_max <= amp_max >>> 1;
      end
    end
  end
endmodule
