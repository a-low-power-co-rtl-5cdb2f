// tb_coap_top: end-to-end test of the co-processor at its default sizes.
//
// A synthetic ECG is streamed at 250 Hz with a 12.5 kHz clock (one sample
// every 50 clocks) for eight 3-s windows.  The windows hold 0 to 4 complete
// beats, some incomplete beats at the window edges, and either a normal
// (R-to-T 60 samples) or a prolonged (90 samples) repolarisation.  The
// network weights are built so that the two output nodes compare RT_m with
// a threshold (its path uses power-of-two weights, exact in the approximate
// multiplier); the other neurons get random weights.
// Checks per window: beat count; descriptors against the nominal fiducial
// points (within filter and rounding tolerances); output nodes and decision
// against the reference network evaluated on the descriptors the design
// produced; the expected class; processing finished within one window
// period (real-time at 12.5 kHz).  Also counts that every mechanism happened:
// division by n = 1, 2, 3 and 4, an empty window, incomplete beats dropped,
// ReLU clipping, both decisions, both RAM banks.
module tb_coap_top;
  import coap_pkg::*;
  import tb_ref_pkg::*;
  localparam int CLK_PER_SAMPLE = 50;
  localparam int TH = 300;                    // RT_m threshold, Q10.6 (4.69 samples x 16)

  logic clk = 0, rst_n = 0, sample_valid = 0, wmem_we = 0;
  q_t   sample = '0, wmem_wdata = '0;
  logic [WADDR_W-1:0] wmem_addr = '0;
  logic result_valid, arrhythmia, normal, peak_pulse, overrun, busy;
  q_t   descriptors [N_IN];
  q_t   out_nodes [N_L4];
  logic [CNT_W-1:0] n_beats;
  int checks = 0, failures = 0;

  coap_top dut (.clk, .rst_n, .sample_valid, .sample, .wmem_we, .wmem_addr, .wmem_wdata,
                .result_valid, .arrhythmia, .normal, .descriptors, .n_beats, .out_nodes,
                .peak_pulse, .overrun, .busy);
  always #5 clk = ~clk;

  // Beat schedule: R position (absolute sample) and R-to-T offset.
  typedef struct { int r; int toff; } beat_s;
  beat_s sched [$] = '{
    '{150, 60}, '{350, 60}, '{550, 60},                        // w0: 3 beats
    '{860, 60}, '{1010, 60}, '{1160, 60}, '{1310, 60},         // w1: 4 beats
    '{1630, 90}, '{1830, 90}, '{2030, 90},                     // w2: 3, prolonged
    '{2450, 90}, '{2750, 90}, '{2950, 60},                     // w3: 2 + one cut at the end
    '{3260, 60}, '{3460, 60},                                  // w4: 2
    '{3790, 60}, '{3990, 60}, '{4190, 60}, '{4390, 60},        // w5: one cut at each end, 2
    '{4800, 60}};                                              // w6: 1; w7: none
  localparam int NWIN = 8;
  int exp_n [NWIN]   = '{3, 4, 3, 2, 2, 2, 1, 0};
  int exp_arr [NWIN] = '{0, 0, 1, 1, 0, 0, 0, 0};
  int exp_toff [NWIN] = '{60, 60, 90, 90, 60, 60, 60, 60};

  int wm [];
  int win_no = 0;
  int seen_n [5] = '{0, 0, 0, 0, 0};
  int n_arr = 0, n_nor = 0, n_relu = 0, n_dropped = 0, n_peaks = 0, n_bank [2] = '{0, 0};
  longint t_win_end, worst_latency = 0;

  function automatic int ecg(input int n);
    int v = 0;
    foreach (sched[i]) v += beat_shape(n - sched[i].r, sched[i].toff);
    return v;
  endfunction

  // Weight image: an RT_m comparator path through neurons 0 and 1 of each
  // layer, random weights elsewhere.
  function automatic void build_weights();
    int sizes [5] = '{6, 32, 16, 8, 2};
    int ptr = 0;
    wm = new[WMEM_DEPTH];
    for (int l = 0; l < 4; l++)
      for (int j = 0; j < sizes[l+1]; j++) begin
        for (int i = 0; i <= sizes[l]; i++) begin
          if (j < 2 || l == 3) wm[ptr + i] = 0;
          else if (i < 2 && l > 0) wm[ptr + i] = 0;
          else wm[ptr + i] = int'($urandom % 65) - 32;
        end
        if (l == 0 && j == 0) begin wm[ptr + D_RT_M] = 64;  wm[ptr + 6] = -TH; end
        if (l == 0 && j == 1) begin wm[ptr + D_RT_M] = -64; wm[ptr + 6] = TH;  end
        if (l > 0 && l < 3 && j < 2) wm[ptr + j] = 64;
        if (l == 3 && j == 0) wm[ptr + 1] = 64;            // normal node <- TH - RT_m
        if (l == 3 && j == 1) wm[ptr + 0] = 64;            // arrhythmia node <- RT_m - TH
        ptr += sizes[l] + 1;
      end
  endfunction

  initial begin
    repeat (NWIN * 750 * CLK_PER_SAMPLE + 200000) @(posedge clk);
    failures++;
    $display("watchdog: stopped in window %0d", win_no);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters from inside the design.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dnn.u_mac.y_valid === 1'b0 && dut.u_dnn.u_mac.fin && dut.u_dnn.u_mac.relu_en &&
        dut.u_dnn.u_mac.pre < 0) n_relu++;
    if (dut.win_end) begin
      t_win_end = $time;
      n_bank[dut.wbank ? 0 : 1]++;
      n_dropped += int'(dut.u_rpk.cnt);
    end
    if (peak_pulse) n_peaks++;
    if (overrun) begin failures++; $display("window skipped"); end
  end

  function automatic bit near(input int v, input int nominal);
    return (v >= nominal - 8 - nominal / 25) && (v <= nominal + 8 + nominal / 25);
  endfunction

  // Check each result.
  always @(posedge clk) if (rst_n && result_valid) begin
    int iv [6];
    int eo [2];
    int w, toff;
    longint lat;
    w = win_no;
    lat = ($time - t_win_end) / 10;
    if (lat > worst_latency) worst_latency = lat;
    checks++;
    if (lat >= 750 * CLK_PER_SAMPLE) begin failures++; $display("w%0d: latency %0d clocks", w, lat); end
    foreach (iv[i]) iv[i] = int'(descriptors[i]);
    dnn_ref(iv, wm, eo);
    $display("w%0d: n=%0d desc=%0d %0d %0d %0d %0d %0d nodes=%0d %0d arrhythmia=%b latency=%0d",
             w, n_beats, iv[0], iv[1], iv[2], iv[3], iv[4], iv[5], out_nodes[0], out_nodes[1], arrhythmia, lat);
    checks++;
    if (int'(n_beats) != exp_n[w]) begin failures++; $display("  beats %0d, expected %0d", n_beats, exp_n[w]); end
    else seen_n[n_beats]++;
    checks++;
    if (int'(out_nodes[0]) != eo[0] || int'(out_nodes[1]) != eo[1] || arrhythmia != (eo[1] > eo[0])) begin
      failures++; $display("  nodes differ from the reference network: %0d %0d", eo[0], eo[1]);
    end
    checks++;
    if (int'(arrhythmia) != exp_arr[w] || normal == arrhythmia) begin failures++; $display("  wrong class"); end
    if (arrhythmia) n_arr++; else n_nor++;
    toff = exp_toff[w];
    checks++;
    if (exp_n[w] == 0) begin
      foreach (iv[i]) if (iv[i] != 0) begin failures++; $display("  empty window gives nonzero descriptors"); break; end
    // Tolerance: 2 samples of filter shift, plus 4 % for the approximate
    // division by 3.
    end else if (!near(iv[D_QRS_M], 32) || !near(iv[D_RT_M], toff * 4) ||
                 iv[D_RT_VAR] > 8 ||
                 !near(iv[D_PS_M], 176) ||
                 iv[D_ICEB_M] < (toff + 4) * 8 * 8 / 10 || iv[D_ICEB_M] > (toff + 4) * 8 * 12 / 10 ||
                 iv[D_ICEB_VAR] > 64) begin
      failures++; $display("  descriptors out of tolerance");
    end
    win_no++;
  end

  initial begin
    build_weights();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Load the weight memory.
    for (int a = 0; a < int'(WMEM_DEPTH); a++) begin
      @(negedge clk); wmem_we = 1; wmem_addr = WADDR_W'(a); wmem_wdata = q_t'(wm[a]);
    end
    @(negedge clk); wmem_we = 0;
    // Stream the ECG.
    for (int n = 0; n < NWIN * 750; n++) begin
      @(negedge clk); sample_valid = 1; sample = q_t'(ecg(n));
      @(negedge clk); sample_valid = 0;
      repeat (CLK_PER_SAMPLE - 2) @(negedge clk);
    end
    repeat (5000) @(negedge clk);
    checks++;
    if (win_no != NWIN) begin failures++; $display("%0d results for %0d windows", win_no, NWIN); end
    $display("mechanisms: n=1:%0d n=2:%0d n=3:%0d n=4:%0d empty:%0d dropped-beats:%0d relu-clips:%0d arrhythmia:%0d normal:%0d bank0:%0d bank1:%0d",
             seen_n[1], seen_n[2], seen_n[3], seen_n[4], seen_n[0], n_peaks - (3+4+3+2+2+2+1), n_relu, n_arr, n_nor, n_bank[0], n_bank[1]);
    $display("worst window processing latency: %0d clocks of %0d", worst_latency, 750 * CLK_PER_SAMPLE);
    for (int k = 0; k < 5; k++) begin checks++; if (seen_n[k] == 0) begin failures++; $display("n=%0d never seen", k); end end
    checks++; if (n_peaks - (3+4+3+2+2+2+1) <= 0) begin failures++; $display("no incomplete beat dropped"); end
    checks++; if (n_relu == 0) begin failures++; $display("ReLU never clipped"); end
    checks++; if (n_arr == 0 || n_nor == 0) begin failures++; $display("one class never decided"); end
    checks++; if (n_bank[0] == 0 || n_bank[1] == 0) begin failures++; $display("one RAM bank never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
