// tb_hidden_neuron: checks one serial hidden neuron (39 inputs).
//
// The testbench plays the neuron's two weight ROMs: it answers `addr` with
// canonical masks of random weights (tb_ref_pkg). It streams vectors back to
// back and with idle cycles, checks that `addr` counts the elements, that the
// output equals the reference tansig(sum x*w + bias) and that `out_valid`
// pulses exactly one clock after the last element. A reset in the middle of
// a vector must discard the partial sum.
module tb_hidden_neuron;
  import csd_nn_pkg::*;
  import tb_ref_pkg::*;

  localparam int NI = 39;

  logic clk = 1'b0, rst = 1'b1, load = 1'b0;
  data_t data_in = '0;
  logic [5:0] addr;
  logic [17:0] w_pos, w_neg;
  logic signed [31:0] bias = '0;
  data_t data_out;
  logic out_valid;

  hidden_neuron dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int w [NI];
  logic [17:0] mp [NI];
  logic [17:0] mn [NI];
  always_comb begin
    w_pos = (addr < 6'(NI)) ? mp[addr] : '0;
    w_neg = (addr < 6'(NI)) ? mn[addr] : '0;
  end

  int     exp_q [$];
  longint due_q [$];

  task automatic new_weights(int wmax);
    for (int i = 0; i < NI; i++) begin
      w[i] = int'($urandom_range(0, 2 * wmax)) - wmax;
      csd_masks(w[i], 1, mp[i], mn[i]);
    end
    bias = 32'(int'($urandom_range(0, 400000000)) - 200000000);
  endtask

  task automatic run_vector(bit gaps);
    longint s;
    int x [NI];
    s = longint'(bias);
    for (int i = 0; i < NI; i++) begin
      x[i] = int'($urandom_range(0, 10000));
      s += longint'(x[i]) * csd_value_dropped(w[i], 1);
    end
    exp_q.push_back(tansig_ref(s));
    for (int i = 0; i < NI; i++) begin
      if (gaps && $urandom_range(0, 2) == 0) begin
        @(negedge clk);
        load = 1'b0;
      end
      @(negedge clk);
      load = 1'b1;
      data_in = 18'(x[i]);
      checks++;
      if (addr != 6'(i)) begin
        failures++;
        $display("element %0d: addr=%0d", i, addr);
      end
    end
    due_q.push_back(cycle + 1);
  endtask

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected out_valid");
      end else begin
        int e;
        longint d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (int'(data_out) != e || cycle != d) begin
          failures++;
          $display("got %0d at %0d, expected %0d at %0d", data_out, cycle, e, d);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    new_weights(8000);
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int v = 0; v < 5; v++) run_vector(0);
    for (int v = 0; v < 5; v++) run_vector(1);
    @(negedge clk);
    load = 1'b0;
    repeat (3) @(negedge clk);
    // reset in the middle of a vector
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      load = 1'b1;
      data_in = 18'sd9999;
    end
    @(negedge clk);
    load = 1'b0;
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    new_weights(131071);
    for (int v = 0; v < 4; v++) run_vector(0);
    @(negedge clk);
    load = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
