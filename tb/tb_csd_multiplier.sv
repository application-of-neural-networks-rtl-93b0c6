// tb_csd_multiplier: checks the CSD shift-and-add multiplier.
//
// Coefficient masks come from the independent non-adjacent-form reference in
// tb_ref_pkg (with 0..4 digits dropped), so the multiplier sees canonical
// coefficients with 0..9 nonzero digits. Each product is compared with the
// ordinary integer product x * (pos - neg). Corners: extreme multiplicands,
// the densest coefficient (9 alternating digits) and zero.
module tb_csd_multiplier;
  import tb_ref_pkg::*;

  localparam int W = 18;

  logic signed [W-1:0]   x;
  logic        [W-1:0]   pos, neg;
  logic signed [2*W-1:0] product;

  csd_multiplier dut (.*);

  int checks = 0, failures = 0;

  task automatic check(longint xv, longint wv, int drop);
    logic [17:0] p, n;
    longint expect_v;
    csd_masks(wv, drop, p, n);
    x = W'(xv);
    pos = p;
    neg = n;
    #1;
    expect_v = xv * (longint'({1'b0, p}) - longint'({1'b0, n}));
    checks++;
    if (longint'(product) != expect_v) begin
      failures++;
      $display("x=%0d w=%0d drop=%0d: got %0d expected %0d", xv, wv, drop, product, expect_v);
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
    longint corners_x [5] = '{0, 1, -1, 131071, -131072};
    longint corners_w [6] = '{0, 1, -1, 87381, -87382, -131072};
    foreach (corners_x[i]) foreach (corners_w[j]) check(corners_x[i], corners_w[j], 0);
    for (int i = 0; i < 4000; i++)
      check(longint'($signed(W'($urandom))), longint'($signed(W'($urandom))),
            int'($urandom_range(0, 4)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
