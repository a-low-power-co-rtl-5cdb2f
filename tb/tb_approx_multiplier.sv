// tb_approx_multiplier: compares the approximate multiplier bit-exactly with
// the reference model, bounds its error against the exact product (3 % of
// |a*b| plus 2 LSB), checks that powers of two multiply exactly, and checks
// that its mean error is below that of the classic Mitchell multiplier.
module tb_approx_multiplier;
  import tb_ref_pkg::*;
  logic signed [15:0] a, b;
  logic signed [31:0] p;
  int checks = 0, failures = 0;
  real err_am = 0.0, err_mi = 0.0;

  approx_multiplier #(.W(16)) dut (.a, .b, .p);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input int av, input int bv);
    longint exact, ref_p, e;
    a = 16'(av); b = 16'(bv);
    #1;
    exact = longint'(av) * longint'(bv);
    ref_p = am_ref(av, bv);
    checks++;
    if (longint'(p) != ref_p) begin
      failures++;
      if (failures < 10) $display("MISMATCH a=%0d b=%0d p=%0d ref=%0d", av, bv, p, ref_p);
    end
    e = longint'(p) - exact;
    if (e < 0) e = -e;
    checks++;
    if (real'(e) > 0.03 * ((exact < 0) ? -real'(exact) : real'(exact)) + 2.0) begin
      failures++;
      if (failures < 10) $display("error too large a=%0d b=%0d p=%0d exact=%0d", av, bv, p, exact);
    end
    if (exact != 0) begin
      real ex, pa, pm;
      ex = real'(exact);
      pa = real'(longint'(p));
      pm = real'(mitchell_ref(av, bv));
      err_am += rabs(pa - ex) / rabs(ex);
      err_mi += rabs(pm - ex) / rabs(ex);
    end
  endtask

  initial begin
    int n = 0;
    // Powers of two and zero: exact.
    for (int i = 0; i < 15; i++)
      for (int j = 0; j < 15; j++) begin
        a = 16'(1 << i); b = 16'(-(1 << j));
        #1;
        checks++;
        if (longint'(p) != -(longint'(1) << (i + j))) failures++;
      end
    a = 0; b = 16'sd1234; #1; checks++; if (p != 0) failures++;
    check(-32768, -32768);
    check(32767, -32768);
    check(3, 5);
    check(7, 7);
    // Random operands, including the Q10.6 range typical of the network.
    repeat (20000) begin
      check(int'($signed(16'($urandom))), int'($signed(16'($urandom))));
      check(int'($signed(16'($urandom % 2048))) - 1024, int'($signed(16'($urandom % 128))) - 64);
      n += 2;
    end
    checks++;
    $display("mean relative error: approximate %f %%, Mitchell %f %%", 100.0 * err_am / n, 100.0 * err_mi / n);
    if (err_am >= err_mi) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
