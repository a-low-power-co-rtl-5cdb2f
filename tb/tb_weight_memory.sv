// tb_weight_memory: fills all 906 words with a pattern, reads them back in a
// scrambled order and checks the one-clock read latency.
module tb_weight_memory;
  import coap_pkg::*;
  logic clk = 0, we = 0;
  logic [WADDR_W-1:0] waddr = '0, raddr = '0;
  q_t wdata = '0, rdata;
  int checks = 0, failures = 0;

  weight_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  function automatic q_t pat(input int a);
    return q_t'((a * 40503 + 17) ^ (a << 7));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < int'(WMEM_DEPTH); a++) begin
      @(negedge clk); we = 1; waddr = WADDR_W'(a); wdata = pat(a);
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < int'(WMEM_DEPTH); k++) begin
      int a;
      a = (k * 337) % int'(WMEM_DEPTH);
      @(negedge clk); raddr = WADDR_W'(a);
      @(negedge clk);
      checks++;
      if (rdata !== pat(a)) begin failures++; $display("addr %0d: %h", a, rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
