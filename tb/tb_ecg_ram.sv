// tb_ecg_ram: writes different data into both banks, then reads both back,
// including while the other bank is being written.
module tb_ecg_ram;
  import coap_pkg::*;
  logic clk = 0, we = 0, wbank = 0, rbank = 0;
  idx_t waddr = '0, raddr = '0;
  q_t   wdata = '0, rdata;
  int checks = 0, failures = 0;

  ecg_ram dut (.clk, .we, .wbank, .waddr, .wdata, .rbank, .raddr, .rdata);
  always #5 clk = ~clk;

  function automatic q_t pat(input int bank, input int a);
    return q_t'(a * 31 + bank * 12345 - 7000);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < int'(WIN_LEN); a++) begin
      @(negedge clk); we = 1; wbank = 0; waddr = idx_t'(a); wdata = pat(0, a);
    end
    // Write bank 1 while reading bank 0.
    for (int a = 0; a < int'(WIN_LEN); a++) begin
      @(negedge clk); we = 1; wbank = 1; waddr = idx_t'(a); wdata = pat(1, a);
      rbank = 0; raddr = idx_t'(WIN_LEN - 1 - a);
      @(negedge clk); we = 0;
      checks++;
      if (rdata !== pat(0, WIN_LEN - 1 - a)) failures++;
    end
    for (int a = 0; a < int'(WIN_LEN); a++) begin
      @(negedge clk); rbank = 1; raddr = idx_t'(a);
      @(negedge clk);
      checks++;
      if (rdata !== pat(1, a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
