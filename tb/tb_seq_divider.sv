// tb_seq_divider: random divisions against the exact quotient, checking also
// that done comes exactly W clocks after start.
module tb_seq_divider;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] dividend, divisor, quot;
  logic busy, done;
  int checks = 0, failures = 0;

  seq_divider #(.W(32)) dut (.clk, .rst_n, .start, .dividend, .divisor, .quot, .busy, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int cyc;
      dividend = (t % 3 == 0) ? $urandom : ($urandom % 20000);
      divisor  = (t % 5 == 0) ? ($urandom % 40 + 1) : ((t == 7) ? 0 : $urandom % 70000 + 1);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      // done is high 32 clocks after the edge that samples start
      if (cyc != 33) begin failures++; $display("latency %0d", cyc); end
      checks++;
      if (divisor == 0) begin
        if (quot != 32'hffff_ffff) failures++;
      end else if (quot != dividend / divisor) begin
        failures++;
        $display("%0d / %0d = %0d got %0d", dividend, divisor, dividend / divisor, quot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
