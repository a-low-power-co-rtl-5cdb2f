// tb_neuron_mac: random neurons of 2..32 inputs.  The output must equal the
// reference neuron (approximate products summed, bias, ReLU when enabled,
// saturation), one clock after fin.  Counts how often ReLU clipped.
module tb_neuron_mac;
  import coap_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, acc_en = 0, fin = 0, relu_en = 0, y_valid;
  q_t x = '0, w = '0, bias = '0, y;
  int checks = 0, failures = 0, clipped = 0;

  neuron_mac dut (.clk, .rst_n, .clr, .acc_en, .x, .w, .fin, .bias, .relu_en, .y, .y_valid);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int n, e;
      int xs [], ws [];
      int b;
      bit r;
      n  = 2 + int'($urandom % 31);
      xs = new[n];
      ws = new[n];
      foreach (xs[i]) begin
        xs[i] = int'($urandom % 8192) - 4096;
        ws[i] = int'($urandom % 128) - 64;
      end
      if (t % 97 == 0) foreach (ws[i]) ws[i] = 32767;   // drives saturation
      b = int'($urandom % 4096) - 2048;
      r = t[0];
      for (int i = 0; i < n; i++) begin
        @(negedge clk); acc_en = 1; x = q_t'(xs[i]); w = q_t'(ws[i]);
        fin = (i == n - 1); bias = q_t'(b); relu_en = r;
      end
      @(negedge clk); acc_en = 0; fin = 0;
      e = neuron_ref(xs, ws, b, r);
      checks++;
      if (!y_valid || int'(y) != e) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%0d expected %0d valid=%b", n, y, e, y_valid);
      end
      if (r && e == 0) clipped++;
    end
    checks++;
    if (clipped == 0) failures++;
    $display("ReLU clipped %0d neurons", clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
