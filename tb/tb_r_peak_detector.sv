// tb_r_peak_detector: streams a synthetic ECG (sharp QRS, broad P and T
// waves) in 750-sample windows and checks that exactly the R peaks are
// reported, at their sample index, with the count per window; beats beyond
// the fourth of a window are not recorded.
module tb_r_peak_detector;
  import coap_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, win_end = 0, peak_pulse;
  q_t   x = '0;
  idx_t idx = '0;
  idx_t r_idx [MAX_BEATS];
  logic [CNT_W-1:0] r_cnt;
  int checks = 0, failures = 0;

  r_peak_detector dut (.clk, .rst_n, .in_valid, .x, .idx, .win_end, .r_idx, .r_cnt, .peak_pulse);
  always #5 clk = ~clk;

  // R positions (absolute samples) and T offsets.
  int rpos [$] = '{150, 350, 550,                 // window 0
                   860, 1010, 1160, 1310, 1460,    // window 1: five beats, four kept
                   1700, 2000,                     // window 2
                   2300, 2600, 2900};              // window 3 (2900 is in window 3)
  int npulses = 0;
  always @(posedge clk) if (rst_n && peak_pulse) npulses++;

  function automatic int ecg(input int n);
    int v = 0;
    foreach (rpos[i]) v += beat_shape(n - rpos[i], 60);
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 4; w++) begin
      int exp_r [$];
      exp_r.delete();
      for (int k = 0; k < int'(WIN_LEN); k++) begin
        int n;
        n = w * int'(WIN_LEN) + k;
        @(negedge clk); in_valid = 1; x = q_t'(ecg(n)); idx = idx_t'(k);
        @(negedge clk); in_valid = 0;
      end
      @(negedge clk); win_end = 1;
      @(negedge clk); win_end = 0;
      foreach (rpos[i])
        if (rpos[i] >= w * int'(WIN_LEN) && rpos[i] < (w + 1) * int'(WIN_LEN) && exp_r.size() < 4)
          exp_r.push_back(rpos[i] - w * int'(WIN_LEN));
      checks++;
      if (int'(r_cnt) != exp_r.size()) begin
        failures++;
        $display("window %0d: %0d peaks, expected %0d", w, r_cnt, exp_r.size());
      end
      foreach (exp_r[i]) begin
        checks++;
        if (int'(r_idx[i]) != exp_r[i]) begin
          failures++;
          $display("window %0d peak %0d at %0d, expected %0d", w, i, r_idx[i], exp_r[i]);
        end
      end
    end
    checks++;
    if (npulses != rpos.size()) begin failures++; $display("%0d pulses for %0d beats", npulses, rpos.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
