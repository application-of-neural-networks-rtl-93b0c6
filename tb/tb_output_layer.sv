// tb_output_layer: checks the output layer (28 inputs, 6 neurons).
//
// Loads every neuron's coefficient store and bias through the write port,
// applies random hidden outputs and checks all 6 outputs against the
// reference one clock after `in_valid`. Distinct weights per neuron and per
// word expose a wrong neuron select or word address on the write path.
module tb_output_layer;
  import csd_nn_pkg::*;
  import tb_ref_pkg::*;

  localparam int NH = 28, NO = 6;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  data_t h [NH];
  logic wr_weight = 1'b0, wr_bias = 1'b0;
  logic [2:0] wr_neuron = '0;
  logic [4:0] wr_addr = '0;
  logic [17:0] wr_pos = '0, wr_neg = '0;
  logic signed [31:0] wr_bias_val = '0;
  data_t data_out [NO];
  logic out_valid;

  output_layer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int w [NO][NH];
  int b [NO];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (h[i]) h[i] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int o = 0; o < NO; o++) begin
      for (int n = 0; n < NH; n++) begin
        logic [17:0] p, q;
        w[o][n] = int'($urandom_range(0, 30000)) - 15000;
        csd_masks(w[o][n], 1, p, q);
        @(negedge clk);
        wr_weight = 1'b1; wr_neuron = 3'(o); wr_addr = 5'(n); wr_pos = p; wr_neg = q;
      end
      b[o] = int'($urandom_range(0, 200000000)) - 100000000;
      @(negedge clk);
      wr_weight = 1'b0; wr_bias = 1'b1; wr_neuron = 3'(o); wr_bias_val = 32'(b[o]);
    end
    @(negedge clk);
    wr_bias = 1'b0;
    for (int t = 0; t < 50; t++) begin
      for (int n = 0; n < NH; n++) h[n] = 18'(int'($urandom_range(0, 20000)) - 10000);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("t=%0d: out_valid missing", t);
      end
      for (int o = 0; o < NO; o++) begin
        longint s;
        s = b[o];
        for (int n = 0; n < NH; n++) s += longint'(h[n]) * csd_value_dropped(w[o][n], 1);
        checks++;
        if (int'(data_out[o]) != tansig_ref(s)) begin
          failures++;
          $display("t=%0d neuron %0d: got %0d expected %0d", t, o, data_out[o], tansig_ref(s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
