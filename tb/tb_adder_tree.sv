// tb_adder_tree: checks the adder tree for a power-of-two and an odd operand
// count (29 = 28 products + bias, as in the output neuron) against a plain
// running sum, with random and extreme operands.
module tb_adder_tree;

  localparam int IW = 36;

  logic signed [IW-1:0] op29 [29];
  logic signed [IW-1+5:0] sum29;
  logic signed [IW-1:0] op8 [8];
  logic signed [IW-1+3:0] sum8;

  adder_tree #(.N(29), .IN_W(IW)) u29 (.operand(op29), .sum(sum29));
  adder_tree #(.N(8),  .IN_W(IW)) u8  (.operand(op8),  .sum(sum8));

  int checks = 0, failures = 0;

  function automatic longint rnd36();
    return longint'($signed({$urandom, $urandom})) >>> 28;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint r29, r8;
      r29 = 0;
      r8  = 0;
      for (int i = 0; i < 29; i++) begin
        longint v;
        v = (t == 0) ? -(longint'(1) <<< 35) : (t == 1) ? (longint'(1) <<< 35) - 1 : rnd36();
        op29[i] = IW'(v);
        r29 += v;
      end
      for (int i = 0; i < 8; i++) begin
        longint v;
        v = rnd36();
        op8[i] = IW'(v);
        r8 += v;
      end
      #1;
      checks += 2;
      if (longint'(sum29) != r29) begin
        failures++;
        $display("N=29: got %0d expected %0d", sum29, r29);
      end
      if (longint'(sum8) != r8) begin
        failures++;
        $display("N=8: got %0d expected %0d", sum8, r8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
