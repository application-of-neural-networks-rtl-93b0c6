// tb_csd_nn_top: end-to-end test of the classifier at its default sizes
// (39 inputs, 28 hidden neurons, 6 outputs, lowest nonzero digit dropped).
//
// Loads random weights and biases through the configuration port, streams
// feature vectors (back to back and with idle gaps between and inside
// vectors) and compares every output with a reference network computed here
// from tb_ref_pkg (CSD digit drop, 32-bit saturation, tansig table). It checks
// that out_valid comes exactly 2 clocks after the last element of a vector.
// A second weight set with full-range coefficients drives the sums into
// 32-bit saturation and past the end of the activation table. Counts of each
// mechanism seen are printed; one that never happened counts as a failure.
module tb_csd_nn_top;
  import csd_nn_pkg::*;
  import tb_ref_pkg::*;

  localparam int NI = N_IN_DEF, NH = N_HID_DEF, NO = N_OUT_DEF, DROP = 1;
  localparam int NW = (NH > NO) ? $clog2(NH) : $clog2(NO);
  localparam int AW = (NI > NH) ? $clog2(NI) : $clog2(NH);

  logic clk = 1'b0, rst = 1'b1;
  logic load = 1'b0;
  data_t data_in = '0;
  logic cfg_we = 1'b0;
  cfg_sel_e cfg_sel = CFG_HID_WEIGHT;
  logic [NW-1:0] cfg_neuron = '0;
  logic [AW-1:0] cfg_addr = '0;
  data_t cfg_weight = '0;
  logic signed [AF_IN_W-1:0] cfg_bias = '0;
  data_t data_out [NO];
  logic out_valid;

  csd_nn_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // reference network state
  int wh [NH][NI];
  int bh [NH];
  int wo [NO][NH];
  int bo [NO];

  // mechanism counters
  int n_vectors = 0, n_back_to_back = 0, n_gaps = 0, n_dropped = 0, n_negdigit = 0;
  int n_sat32 = 0, n_lut_end = 0, n_neg_out = 0;

  // expected results, in order
  int     exp_q [$];
  longint due_q [$];

  task automatic cfg_write(cfg_sel_e sel, int neuron, int addr, int w, longint b);
    @(negedge clk);
    cfg_we = 1'b1; cfg_sel = sel; cfg_neuron = NW'(neuron); cfg_addr = AW'(addr);
    cfg_weight = DATA_W'(w); cfg_bias = AF_IN_W'(b);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic int rnd_range(int lo, int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  task automatic load_weights(int wmax, longint bmax);
    for (int n = 0; n < NH; n++) begin
      for (int i = 0; i < NI; i++) begin
        wh[n][i] = rnd_range(-wmax, wmax);
        if (csd_value_dropped(wh[n][i], DROP) != wh[n][i]) n_dropped++;
        if (naf_digits(wh[n][i])[0] < 0 || wh[n][i] < 0) n_negdigit++;
        cfg_write(CFG_HID_WEIGHT, n, i, wh[n][i], 0);
      end
      bh[n] = int'(longint'($urandom_range(0, 2*int'(bmax/1000))) * 1000 - bmax);
      cfg_write(CFG_HID_BIAS, n, 0, 0, bh[n]);
    end
    for (int o = 0; o < NO; o++) begin
      for (int n = 0; n < NH; n++) begin
        wo[o][n] = rnd_range(-wmax, wmax);
        cfg_write(CFG_OUT_WEIGHT, o, n, wo[o][n], 0);
      end
      bo[o] = int'(longint'($urandom_range(0, 2*int'(bmax/1000))) * 1000 - bmax);
      cfg_write(CFG_OUT_BIAS, o, 0, 0, bo[o]);
    end
  endtask

  // Reference: one vector through both layers.
  task automatic reference(int x [NI], output int y [NO]);
    int h [NH];
    for (int n = 0; n < NH; n++) begin
      longint s = bh[n];
      for (int i = 0; i < NI; i++) s += longint'(x[i]) * csd_value_dropped(wh[n][i], DROP);
      if (sat32(s) != s) n_sat32++;
      if (tansig_saturates(s)) n_lut_end++;
      h[n] = tansig_ref(s);
    end
    for (int o = 0; o < NO; o++) begin
      longint s = bo[o];
      for (int n = 0; n < NH; n++) s += longint'(h[n]) * csd_value_dropped(wo[o][n], DROP);
      if (sat32(s) != s) n_sat32++;
      if (tansig_saturates(s)) n_lut_end++;
      y[o] = tansig_ref(s);
      if (y[o] < 0) n_neg_out++;
    end
  endtask

  // Stream `count` vectors; gap_mode 0: back to back, 1: gaps inside and between.
  task automatic run_vectors(int count, int gap_mode);
    for (int v = 0; v < count; v++) begin
      int x [NI];
      int y [NO];
      for (int i = 0; i < NI; i++) x[i] = rnd_range(0, 10000);
      reference(x, y);
      for (int o = 0; o < NO; o++) exp_q.push_back(y[o]);
      for (int i = 0; i < NI; i++) begin
        if (gap_mode == 1 && $urandom_range(0, 3) == 0) begin
          @(negedge clk);
          load = 1'b0;
          n_gaps++;
        end
        @(negedge clk);
        load = 1'b1;
        data_in = DATA_W'(x[i]);
      end
      // the last element is sampled at the next rising edge (counter value
      // `cycle` there); the result is due two edges later
      due_q.push_back(cycle + 2);
      n_vectors++;
      if (gap_mode == 0 && v > 0) n_back_to_back++;
    end
    @(negedge clk);
    load = 1'b0;
  endtask

  // Output checker
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected out_valid at cycle %0d", cycle);
      end else begin
        int     y [NO];
        longint due;
        for (int o = 0; o < NO; o++) y[o] = exp_q.pop_front();
        due = due_q.pop_front();
        checks++;
        if (cycle != due) begin
          failures++;
          $display("latency: out_valid at cycle %0d, expected %0d", cycle, due);
        end
        for (int o = 0; o < NO; o++) begin
          checks++;
          if (int'(data_out[o]) != y[o]) begin
            failures++;
            $display("output %0d: got %0d expected %0d", o, data_out[o], y[o]);
          end
        end
      end
    end
  end

  task automatic report_mechanism(string name, int n);
    $display("  %-34s %0d", name, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", name);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Phase 1: weights in +-0.6, biases in +-1.5 (typical trained network)
    load_weights(6000, 64'd150000000);
    run_vectors(6, 0);
    run_vectors(4, 1);
    repeat (6) @(negedge clk);
    // Phase 2: full-range weights, sums saturate
    load_weights(131071, 64'd2000000000);
    run_vectors(3, 0);
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results never came out", exp_q.size() / NO);
    end
    $display("mechanisms exercised:");
    report_mechanism("feature vectors classified", n_vectors);
    report_mechanism("back-to-back vectors", n_back_to_back);
    report_mechanism("idle cycles inside vectors", n_gaps);
    report_mechanism("weights changed by digit drop", n_dropped);
    report_mechanism("negative weights / -1 digits", n_negdigit);
    report_mechanism("sums clamped to 32 bits", n_sat32);
    report_mechanism("sums past the tansig table end", n_lut_end);
    report_mechanism("negative network outputs", n_neg_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
