// tb_tansig_lut: checks the tansig look-up table.
//
// Compares the output with round(1e4 * tanh(step midpoint)) computed here
// from the real-valued tanh, at zero, at step boundaries, far in saturation
// (including the most negative input), and at random sums. Also checks the
// function is odd and monotonic over a sweep, and that outputs stay within
// +-10000.
module tb_tansig_lut;
  import tb_ref_pkg::*;

  logic signed [31:0] a;
  logic signed [17:0] y;

  tansig_lut dut (.a, .y);

  int checks = 0, failures = 0;

  task automatic check(longint av);
    a = 32'(av);
    #1;
    checks++;
    if (int'(y) != tansig_ref(av) || y > 18'sd10000 || y < -18'sd10000) begin
      failures++;
      $display("a=%0d: got %0d expected %0d", av, y, tansig_ref(av));
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    check(0);
    check(1);
    check(-1);
    check(1048575);
    check(1048576);
    check(-1048576);
    check(100000000);        // tanh(1)
    check(-100000000);
    check(1073741823);
    check(2147483647);
    check(-64'sd2147483648);
    for (int i = 0; i < 3000; i++) check(longint'($signed($urandom)));
    for (int i = 0; i < 3000; i++) check(longint'(int'($urandom_range(0, 800000000))) - 400000000);
    // odd symmetry and monotonic sweep
    prev = -10001;
    for (longint v = -1100000000; v <= 1100000000; v += 3000017) begin
      int yp;
      a = 32'(v);
      #1;
      yp = int'(y);
      a = 32'(-v);
      #1;
      checks++;
      if (int'(y) != -yp || yp < prev) begin
        failures++;
        $display("symmetry/monotonic at %0d: y=%0d y(-a)=%0d prev=%0d", v, yp, y, prev);
      end
      prev = yp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
