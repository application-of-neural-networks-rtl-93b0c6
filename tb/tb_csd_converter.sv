// tb_csd_converter: checks the CSD recoding and the nonzero-digit drop.
//
// Five converters (DROP = 0..4) see the same weight. Checked: the document's
// worked example 478 -> +2^9 -2^5 -2^1, all 28 entries of its digit-drop
// table (7 weights x 4 reductions), then random and corner weights against
// the independent non-adjacent-form reference in tb_ref_pkg, plus the
// canonical property (no adjacent nonzero digits, no digit in both masks).
module tb_csd_converter;
  import tb_ref_pkg::*;

  localparam int W = 18;

  logic signed [W-1:0] weight;
  logic [W-1:0] pos [5];
  logic [W-1:0] neg [5];

  csd_converter #(.W(W), .DROP(0)) u_d0 (.weight, .pos(pos[0]), .neg(neg[0]));
  csd_converter #(.W(W), .DROP(1)) u_d1 (.weight, .pos(pos[1]), .neg(neg[1]));
  csd_converter #(.W(W), .DROP(2)) u_d2 (.weight, .pos(pos[2]), .neg(neg[2]));
  csd_converter #(.W(W), .DROP(3)) u_d3 (.weight, .pos(pos[3]), .neg(neg[3]));
  csd_converter #(.W(W), .DROP(4)) u_d4 (.weight, .pos(pos[4]), .neg(neg[4]));

  int checks = 0, failures = 0;

  function automatic longint mask_value(logic [W-1:0] p, logic [W-1:0] n);
    return longint'({1'b0, p}) - longint'({1'b0, n});
  endfunction

  task automatic check_weight(longint w);
    weight = W'(w);
    #1;
    for (int k = 0; k < 5; k++) begin
      logic [W-1:0] nz;
      nz = pos[k] | neg[k];
      checks++;
      if (mask_value(pos[k], neg[k]) != csd_value_dropped(w, k) ||
          (nz & (nz >> 1)) != '0 || (pos[k] & neg[k]) != '0) begin
        failures++;
        $display("w=%0d drop=%0d: got %0d (pos=%b neg=%b) expected %0d", w, k,
                 mask_value(pos[k], neg[k]), pos[k], neg[k], csd_value_dropped(w, k));
      end
    end
  endtask

  // The document's digit-drop examples: weight, then value after 1..4 drops.
  longint table32 [7][5] = '{
    '{22355, 22356, 22352, 22336, 22272},
    '{-7381, -7380, -7376, -7360, -7424},
    '{-3293, -3292, -3296, -3328, -3072},
    '{15164, 15168, 15104, 15360, 16384},
    '{15416, 15424, 15360, 16384, 0},
    '{2568,  2560,  2048,  0,     0},
    '{8064,  8192,  0,     0,     0}
  };

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 478 = 0111011110b -> 1000-1000-10 (document example)
    weight = 18'sd478;
    #1;
    checks++;
    if (pos[0] != 18'b10_0000_0000 || neg[0] != 18'b00_0010_0010) begin
      failures++;
      $display("478: pos=%b neg=%b", pos[0], neg[0]);
    end
    foreach (table32[r]) begin
      weight = W'(table32[r][0]);
      #1;
      for (int k = 1; k <= 4; k++) begin
        checks++;
        if (mask_value(pos[k], neg[k]) != table32[r][k]) begin
          failures++;
          $display("table: w=%0d drop=%0d got %0d expected %0d", table32[r][0], k,
                   mask_value(pos[k], neg[k]), table32[r][k]);
        end
      end
    end
    check_weight(0);
    check_weight(1);
    check_weight(-1);
    check_weight(131071);
    check_weight(-131072);
    check_weight(87381);   // 010101...01: alternating digits
    check_weight(-87382);
    for (int i = 0; i < 3000; i++) check_weight(longint'($signed(W'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
