// tb_ecg_bpf: band-pass filter.  Checks the output sample by sample against
// the filter's difference equations evaluated in the testbench, and its
// frequency behaviour: DC is removed, 10 Hz passes (gain 0.7..1.1), 100 Hz
// and 0.1 Hz are attenuated (gain below 0.5).  Also checks the one-clock
// output latency.
module tb_ecg_bpf;
  import coap_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  q_t   x = '0, y;
  int checks = 0, failures = 0;
  longint xp = 0, h = 0, l = 0;

  ecg_bpf dut (.clk, .rst_n, .in_valid, .x, .y, .out_valid);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Feed one sample; return the filter output.
  task automatic feed(input int v, output int yo);
    longint d;
    @(negedge clk); in_valid = 1; x = q_t'(v);
    @(negedge clk); in_valid = 0;
    // state scaled by 2^8
    h = longint'(v) * 256 - xp + h - (h >>> 6);
    xp = longint'(v) * 256;
    d = h - l;
    l = l + (d >>> 1) + (d >>> 3);
    checks++;
    if (!out_valid || longint'(y) != (l >>> 8)) begin
      failures++;
      if (failures < 5) $display("y=%0d expected %0d valid=%b", y, l >>> 8, out_valid);
    end
    yo = int'(y);
  endtask

  task automatic tone(input real f, input int n, output int amp);
    int yo;
    amp = 0;
    for (int k = 0; k < n; k++) begin
      feed(int'(1000.0 * $sin(2.0 * 3.14159265 * f * k / 250.0)), yo);
      if (k > n / 2 && (yo > amp)) amp = yo;
      if (k > n / 2 && (-yo > amp)) amp = -yo;
    end
  endtask

  initial begin
    int yo, amp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // DC step
    for (int k = 0; k < 2000; k++) feed(1000, yo);
    checks++;
    if (yo > 30 || yo < -30) begin failures++; $display("DC not removed: %0d", yo); end
    tone(10.0, 1000, amp);
    checks++;
    if (amp < 700 || amp > 1100) begin failures++; $display("10 Hz amplitude %0d", amp); end
    tone(100.0, 1000, amp);
    checks++;
    if (amp > 500) begin failures++; $display("100 Hz amplitude %0d", amp); end
    tone(0.1, 7500, amp);
    checks++;
    if (amp > 500) begin failures++; $display("0.1 Hz amplitude %0d", amp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
