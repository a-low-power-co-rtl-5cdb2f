// tb_peak_delineator: a window holding a synthetic ECG with known P, Q, R, S
// and T positions is served from a one-clock-latency memory model.  The
// delineator must return the four points of every complete beat, skip the
// beats whose search spans leave the window, and take one clock per sample
// read (span + 1 clocks per search).
module tb_peak_delineator;
  import coap_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  idx_t r_idx [MAX_BEATS];
  logic [CNT_W-1:0] r_cnt = '0, n_beats;
  idx_t raddr;
  q_t   rdata;
  beat_t beats [MAX_BEATS];
  int checks = 0, failures = 0;
  q_t win [WIN_LEN];

  peak_delineator dut (.clk, .rst_n, .start, .r_idx, .r_cnt, .raddr, .rdata, .beats, .n_beats, .done);
  always #5 clk = ~clk;
  always_ff @(posedge clk) rdata <= win[raddr < idx_t'(WIN_LEN) ? raddr : '0];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int rs [4], input int toff [4], input int cnt);
    int exp_idx [$];
    int cyc, exp_cyc;
    exp_idx.delete();
    for (int n = 0; n < int'(WIN_LEN); n++) begin
      int v = 0;
      for (int b = 0; b < cnt; b++) v += beat_shape(n - rs[b], toff[b]);
      win[n] = q_t'(v);
    end
    for (int b = 0; b < 4; b++) r_idx[b] = idx_t'(rs[b]);
    r_cnt = CNT_W'(cnt);
    exp_cyc = 2;                                      // start, final check
    for (int b = 0; b < cnt; b++) begin
      exp_cyc += 1;                                   // span check
      if (rs[b] >= 75 && rs[b] + 125 <= 749) begin
        exp_idx.push_back(b);
        exp_cyc += (25 + 1) + (25 + 1) + (50 + 1) + (100 + 1) + 1;
      end
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("took %0d clocks, expected %0d", cyc, exp_cyc); end
    checks++;
    if (int'(n_beats) != exp_idx.size()) begin
      failures++; $display("%0d beats, expected %0d", n_beats, exp_idx.size());
    end
    foreach (exp_idx[i]) begin
      int b, r;
      b = exp_idx[i];
      r = rs[b];
      checks++;
      if (int'(beats[i].r) != r || int'(beats[i].q) != r - 4 || int'(beats[i].s) != r + 4 ||
          int'(beats[i].p) != r - 40 || int'(beats[i].t) != r + toff[b]) begin
        failures++;
        $display("beat %0d: p%0d q%0d r%0d s%0d t%0d, R at %0d", i, beats[i].p, beats[i].q,
                 beats[i].r, beats[i].s, beats[i].t, r);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run('{110, 260, 410, 560}, '{60, 55, 70, 65}, 4);
    run('{70, 250, 450, 700}, '{60, 80, 90, 60}, 4);   // first and last beat incomplete
    run('{200, 500, 0, 0}, '{75, 85, 0, 0}, 2);
    run('{130, 330, 530, 0}, '{90, 90, 90, 0}, 3);
    run('{0, 0, 0, 0}, '{0, 0, 0, 0}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
