// tb_descriptor_processor: random beats (random Q, S, P, T distances around
// R) for windows of 0..4 beats; the six descriptors are recomputed in the
// testbench from their definitions (differences, Q.6 values, division by
// the beat count with the shift rule, threshold shifts 16 and 64) and must
// match exactly.  The latency must be 34 clocks per beat plus 5.
module tb_descriptor_processor;
  import coap_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  beat_t beats [MAX_BEATS];
  logic [CNT_W-1:0] n_beats = '0;
  q_t desc [N_IN];
  int checks = 0, failures = 0;
  int seen_n [5] = '{0, 0, 0, 0, 0};

  descriptor_processor dut (.clk, .rst_n, .start, .beats, .n_beats, .desc, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic one(input int n);
    longint qrs [4], rt [4], ps [4], ic [4];
    longint s_qrs = 0, s_rt = 0, s_ps = 0, s_ic = 0, m_rt, m_ic, v_rt = 0, v_ic = 0;
    longint e [6];
    int cyc;
    for (int b = 0; b < 4; b++) begin
      int r, q, s, p, t;
      r = 100 + b * 150 + int'($urandom % 20);
      q = r - 1 - int'($urandom % 25);
      s = r + 1 + int'($urandom % 25);
      p = q - 1 - int'($urandom % 50);
      t = s + 1 + int'($urandom % 100);
      beats[b] = '{p: idx_t'(p), q: idx_t'(q), r: idx_t'(r), s: idx_t'(s), t: idx_t'(t)};
      qrs[b] = longint'(s - q) * 64;
      rt[b]  = longint'(t - r) * 64;
      ps[b]  = longint'(s - p) * 64;
      ic[b]  = (longint'(t - q) * 64) / longint'(s - q);
    end
    n_beats = CNT_W'(n);
    for (int b = 0; b < n; b++) begin
      s_qrs += qrs[b]; s_rt += rt[b]; s_ps += ps[b]; s_ic += ic[b];
    end
    m_rt = longint'(n_div_ref(s_rt, n));
    m_ic = longint'(n_div_ref(s_ic, n));
    for (int b = 0; b < n; b++) begin
      v_rt += ((rt[b] - m_rt) * (rt[b] - m_rt)) >>> 6;
      v_ic += ((ic[b] - m_ic) * (ic[b] - m_ic)) >>> 6;
    end
    e[0] = sat(longint'(n_div_ref(s_qrs, n)) >>> 4);
    e[1] = sat(m_rt >>> 4);
    e[2] = sat(longint'(n_div_ref(v_rt, n)) >>> 6);
    e[3] = sat(longint'(n_div_ref(s_ps, n)) >>> 4);
    e[4] = sat(m_ic);
    e[5] = sat(longint'(n_div_ref(v_ic, n)));
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 34 * n + 5) begin failures++; $display("n=%0d took %0d clocks", n, cyc); end
    for (int d = 0; d < 6; d++) begin
      checks++;
      if (longint'(desc[d]) != e[d]) begin
        failures++;
        if (failures < 10) $display("n=%0d descriptor %0d = %0d, expected %0d", n, d, desc[d], e[d]);
      end
    end
    seen_n[n]++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) one(k % 5);
    $display("windows per beat count: %0d %0d %0d %0d %0d", seen_n[0], seen_n[1], seen_n[2], seen_n[3], seen_n[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
