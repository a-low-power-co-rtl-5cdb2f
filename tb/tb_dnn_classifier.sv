// tb_dnn_classifier: loads random weights and biases into a weight memory,
// runs the folded network on random descriptor vectors and compares both
// output nodes and the decision with the reference network built from the
// reference approximate multiplier.  Checks the latency (N + 3 clocks per
// neuron of N inputs) and that both decisions occur.
module tb_dnn_classifier;
  import coap_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, arrhythmia, normal;
  logic we = 0;
  logic [WADDR_W-1:0] waddr = '0, w_raddr;
  q_t wdata = '0, w_rdata;
  q_t in_vec [N_IN];
  q_t node [N_L4];
  int checks = 0, failures = 0, n_arr = 0, n_nor = 0;
  int wm [];

  weight_memory u_wm (.clk, .we, .waddr, .wdata, .raddr(w_raddr), .rdata(w_rdata));
  dnn_classifier dut (.clk, .rst_n, .start, .in_vec, .w_raddr, .w_rdata, .node, .arrhythmia, .normal, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int EXP_CYC = 32 * (6 + 3) + 16 * (32 + 3) + 8 * (16 + 3) + 2 * (8 + 3) + 2;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < 4; set++) begin
      wm = new[WMEM_DEPTH];
      foreach (wm[a]) wm[a] = int'($urandom % 97) - 48;       // about +-0.75
      for (int a = 0; a < int'(WMEM_DEPTH); a++) begin
        @(negedge clk); we = 1; waddr = WADDR_W'(a); wdata = q_t'(wm[a]);
      end
      @(negedge clk); we = 0;
      for (int t = 0; t < 10; t++) begin
        int iv [6];
        int eo [2];
        int cyc;
        foreach (iv[i]) begin
          iv[i] = int'($urandom % 2048);
          in_vec[i] = q_t'(iv[i]);
        end
        dnn_ref(iv, wm, eo);
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        foreach (in_vec[i]) in_vec[i] = '0;                    // must have been captured
        cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != EXP_CYC) begin failures++; $display("took %0d clocks, expected %0d", cyc, EXP_CYC); end
        checks++;
        if (int'(node[0]) != eo[0] || int'(node[1]) != eo[1] || arrhythmia != (eo[1] > eo[0]) || normal == arrhythmia) begin
          failures++;
          $display("nodes %0d %0d expected %0d %0d, arrhythmia=%b", node[0], node[1], eo[0], eo[1], arrhythmia);
        end
        if (arrhythmia) n_arr++; else n_nor++;
      end
    end
    checks++;
    if (n_arr == 0 || n_nor == 0) failures++;
    $display("decisions: %0d arrhythmia, %0d normal", n_arr, n_nor);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
