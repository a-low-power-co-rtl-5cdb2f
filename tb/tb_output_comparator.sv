// tb_output_comparator: random and edge-case node pairs; the arrhythmia
// output must be high exactly when node1 > node0 (signed), normal otherwise.
module tb_output_comparator;
  import coap_pkg::*;
  q_t   node0, node1;
  logic arrhythmia, normal;
  int checks = 0, failures = 0;

  output_comparator dut (.node0, .node1, .arrhythmia, .normal);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int a0, input int a1);
    node0 = q_t'(a0); node1 = q_t'(a1);
    #1;
    checks++;
    if (arrhythmia !== (a1 > a0) || normal !== !(a1 > a0)) begin
      failures++;
      $display("node0=%0d node1=%0d arr=%b nor=%b", a0, a1, arrhythmia, normal);
    end
  endtask

  initial begin
    check(0, 0); check(-1, 0); check(0, -1); check(-32768, 32767); check(32767, -32768);
    check(100, 100); check(-200, -100);
    repeat (5000) check(int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
