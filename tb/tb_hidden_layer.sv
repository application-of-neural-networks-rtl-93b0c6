// tb_hidden_layer: checks the hidden layer at its default size, 39 inputs
// and 28 neurons.
//
// Loads each neuron's ROM pair and bias through the write port with
// canonical masks of distinct random weights, streams vectors, and checks
// that all neuron outputs arrive together, one clock after the last element,
// with the reference values. A wrong neuron select or ROM address on the
// write path shows as a mismatch in some neuron.
module tb_hidden_layer;
  import csd_nn_pkg::*;
  import tb_ref_pkg::*;

  localparam int NI = 39, NH = 28;

  logic clk = 1'b0, rst = 1'b1, load = 1'b0;
  data_t data_in = '0;
  logic wr_weight = 1'b0, wr_bias = 1'b0;
  logic [4:0] wr_neuron = '0;
  logic [5:0] wr_addr = '0;
  logic [17:0] wr_pos = '0, wr_neg = '0;
  logic signed [31:0] wr_bias_val = '0;
  data_t data_out [NH];
  logic out_valid;

  hidden_layer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int w [NH][NI];
  int b [NH];
  int     exp_q [$];
  longint due_q [$];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      longint d;
      d = due_q.pop_front();
      checks++;
      if (cycle != d) begin
        failures++;
        $display("out_valid at %0d expected %0d", cycle, d);
      end
      for (int n = 0; n < NH; n++) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(data_out[n]) != e) begin
          failures++;
          $display("neuron %0d: got %0d expected %0d", n, data_out[n], e);
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < NH; n++) begin
      for (int i = 0; i < NI; i++) begin
        logic [17:0] p, q;
        w[n][i] = int'($urandom_range(0, 16000)) - 8000;
        csd_masks(w[n][i], 1, p, q);
        @(negedge clk);
        wr_weight = 1'b1; wr_neuron = 5'(n); wr_addr = 6'(i); wr_pos = p; wr_neg = q;
      end
      b[n] = int'($urandom_range(0, 400000000)) - 200000000;
      @(negedge clk);
      wr_weight = 1'b0; wr_bias = 1'b1; wr_neuron = 5'(n); wr_bias_val = 32'(b[n]);
    end
    @(negedge clk);
    wr_bias = 1'b0;
    for (int v = 0; v < 6; v++) begin
      int x [NI];
      for (int i = 0; i < NI; i++) x[i] = int'($urandom_range(0, 10000));
      for (int n = 0; n < NH; n++) begin
        longint s;
        s = b[n];
        for (int i = 0; i < NI; i++) s += longint'(x[i]) * csd_value_dropped(w[n][i], 1);
        exp_q.push_back(tansig_ref(s));
      end
      for (int i = 0; i < NI; i++) begin
        @(negedge clk);
        load = 1'b1;
        data_in = 18'(x[i]);
      end
      due_q.push_back(cycle + 1);
    end
    @(negedge clk);
    load = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (due_q.size() != 0) begin
      failures++;
      $display("%0d results missing", due_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
