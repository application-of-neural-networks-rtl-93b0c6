// tb_output_neuron: checks one fully parallel output neuron (28 inputs).
//
// Random hidden outputs (within +-10000, the activation range), canonical
// coefficient masks and biases are applied; the registered output must equal
// the reference tansig(sum h*w + bias) one clock after `in_valid`, and hold
// while `in_valid` is low. Full-range coefficients drive the sum into 32-bit
// saturation.
module tb_output_neuron;
  import csd_nn_pkg::*;
  import tb_ref_pkg::*;

  localparam int NH = 28;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  data_t h [NH];
  logic [17:0] w_pos [NH];
  logic [17:0] w_neg [NH];
  logic signed [31:0] bias = '0;
  data_t data_out;
  logic out_valid;

  output_neuron dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 400; t++) begin
      longint s;
      int     e, wmax;
      wmax = (t < 300) ? 10000 : 131071;
      bias = 32'(int'($urandom_range(0, 400000000)) - 200000000);
      s = longint'(bias);
      for (int i = 0; i < NH; i++) begin
        int wv;
        h[i] = 18'(int'($urandom_range(0, 20000)) - 10000);
        wv = int'($urandom_range(0, 2 * wmax)) - wmax;
        csd_masks(wv, int'($urandom_range(0, 2)), w_pos[i], w_neg[i]);
        s += longint'(h[i]) * (longint'({1'b0, w_pos[i]}) - longint'({1'b0, w_neg[i]}));
      end
      if (sat32(s) != s) n_sat++;
      e = tansig_ref(s);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || int'(data_out) != e) begin
        failures++;
        $display("t=%0d: valid=%0b got %0d expected %0d", t, out_valid, data_out, e);
      end
      @(negedge clk);
      checks++;
      if (out_valid || int'(data_out) != e) begin
        failures++;
        $display("t=%0d: output did not hold", t);
      end
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("32-bit saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
