// tb_div_by_n: checks the shift-based division by the beat count for n = 0..4
// against the reference, and that the n = 3 case stays within 4 % of x/3.
module tb_div_by_n;
  import tb_ref_pkg::*;
  logic [31:0] x, q;
  logic [2:0]  n;
  int checks = 0, failures = 0;

  div_by_n #(.W(32)) dut (.x, .n, .q);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) begin
      x = $urandom;
      for (int k = 0; k <= 4; k++) begin
        n = 3'(k);
        #1;
        checks++;
        if (longint'(q) != longint'(n_div_ref(longint'(x), k))) begin
          failures++;
          $display("x=%0d n=%0d q=%0d", x, n, q);
        end
        if (k == 3 && x > 1000) begin
          real r;
          r = real'(q) / (real'(x) / 3.0);
          checks++;
          if (r < 0.96 || r > 1.04) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
