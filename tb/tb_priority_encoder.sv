// tb_priority_encoder: exhaustive check of the leading-one finder over all
// 16-bit inputs against a reference scan.
module tb_priority_encoder;
  import tb_ref_pkg::*;
  logic [15:0] x;
  logic [3:0]  k;
  logic        nz;
  int checks = 0, failures = 0;

  priority_encoder #(.W(16)) dut (.x, .k, .nz);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      x = 16'(v);
      #1;
      checks++;
      if (v == 0) begin
        if (nz !== 1'b0) failures++;
      end else if (nz !== 1'b1 || int'(k) != msb(longint'(v))) begin
        failures++;
        if (failures < 5) $display("x=%h k=%0d expected %0d", x, k, msb(longint'(v)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
