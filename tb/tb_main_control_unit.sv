// tb_main_control_unit: with a 20-sample window, checks the write index and
// bank of every sample, the window-end pulse, the read bank handed to the
// processing side, the order of the start pulses (delineation, descriptors,
// DNN) and result_valid, and the overrun pulse when a window ends while the
// previous one is still being processed.
module tb_main_control_unit;
  import coap_pkg::*;
  localparam int WIN = 20;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic ram_we, wbank, rbank, win_end, del_start, desc_start, dnn_start, result_valid, overrun, busy;
  logic del_done = 0, desc_done = 0, dnn_done = 0;
  idx_t widx;
  int checks = 0, failures = 0;
  int n_del = 0, n_desc = 0, n_dnn = 0, n_res = 0, n_over = 0, n_wend = 0;
  int dnn_delay = 30;

  main_control_unit #(.WIN(WIN)) dut (.clk, .rst_n, .in_valid, .ram_we, .wbank, .widx, .rbank, .win_end,
    .del_start, .del_done, .desc_start, .desc_done, .dnn_start, .dnn_done, .result_valid, .overrun, .busy);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Processing blocks: answer each start after a delay, checking the order.
  always @(posedge clk) if (rst_n) begin
    if (win_end) n_wend++;
    if (overrun) n_over++;
    if (result_valid) begin
      n_res++;
      checks++;
      if (n_dnn != n_res) failures++;
    end
    if (del_start) begin
      n_del++;
      checks++;
      if (n_desc != n_del - 1 || rbank == wbank) begin failures++; $display("delineation start out of order"); end
      fork begin repeat (5) @(negedge clk); del_done = 1; @(negedge clk); del_done = 0; end join_none
    end
    if (desc_start) begin
      n_desc++;
      checks++;
      if (n_desc != n_del) failures++;
      fork begin repeat (7) @(negedge clk); desc_done = 1; @(negedge clk); desc_done = 0; end join_none
    end
    if (dnn_start) begin
      n_dnn++;
      checks++;
      if (n_dnn != n_desc) failures++;
      fork begin repeat (dnn_delay) @(negedge clk); dnn_done = 1; @(negedge clk); dnn_done = 0; end join_none
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Three windows, samples every 4 clocks: processing (about 45 clocks)
    // ends before the next window end (80 clocks).
    for (int k = 0; k < 3 * WIN; k++) begin
      @(negedge clk); in_valid = 1;
      checks++;
      if (int'(widx) != k % WIN || wbank != ((k / WIN) % 2 == 1) || !ram_we) begin
        failures++; $display("sample %0d written at bank %0d index %0d", k, wbank, widx);
      end
      @(negedge clk); in_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    checks++;
    if (n_wend != 3 || n_res != 3 || n_over != 0) begin
      failures++; $display("windows %0d results %0d overruns %0d", n_wend, n_res, n_over);
    end
    // Slow DNN: the next window ends while it runs.
    dnn_delay = 200;
    for (int k = 0; k < 2 * WIN; k++) begin
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
    end
    repeat (400) @(negedge clk);
    checks++;
    if (n_over != 1 || n_res != 4) begin failures++; $display("overruns %0d results %0d", n_over, n_res); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
