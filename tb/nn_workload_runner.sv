// nn_workload_runner: drives one csd_nn_top configuration through a test set.
//
// Loads random weights (within +-0.8) and biases (within +-1.5), then
// streams N_VEC random feature vectors back to back and checks every output
// and its 2-clock latency against the reference network of tb_ref_pkg.
// Raises `done` when all results have been checked; `checks`/`failures`
// hold the tallies.
module nn_workload_runner
  import csd_nn_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int N_HID   = N_HID_DEF,
  parameter int NZ_DROP = 1,
  parameter int N_VEC   = 200
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int NI = N_IN_DEF, NO = N_OUT_DEF;
  localparam int NW = (N_HID > NO) ? $clog2(N_HID) : $clog2(NO);
  localparam int AW = (NI > N_HID) ? $clog2(NI) : $clog2(N_HID);

  logic rst = 1'b1, load = 1'b0;
  data_t data_in = '0;
  logic cfg_we = 1'b0;
  cfg_sel_e cfg_sel = CFG_HID_WEIGHT;
  logic [NW-1:0] cfg_neuron = '0;
  logic [AW-1:0] cfg_addr = '0;
  data_t cfg_weight = '0;
  logic signed [AF_IN_W-1:0] cfg_bias = '0;
  data_t data_out [NO];
  logic out_valid;

  csd_nn_top #(.N_HID(N_HID), .NZ_DROP(NZ_DROP)) dut (.*);

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int wh [N_HID][NI];
  int bh [N_HID];
  int wo [NO][N_HID];
  int bo [NO];
  int     exp_q [$];
  longint due_q [$];
  int     seen = 0;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  task automatic cfg_write(cfg_sel_e sel, int neuron, int addr, int w, int b);
    @(negedge clk);
    cfg_we = 1'b1; cfg_sel = sel; cfg_neuron = NW'(neuron); cfg_addr = AW'(addr);
    cfg_weight = DATA_W'(w); cfg_bias = AF_IN_W'(b);
  endtask

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      longint d;
      d = due_q.pop_front();
      checks++;
      if (cycle != d) failures++;
      for (int o = 0; o < NO; o++) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(data_out[o]) != e) begin
          failures++;
          $display("[N_HID=%0d drop=%0d] output %0d: got %0d expected %0d",
                   N_HID, NZ_DROP, o, data_out[o], e);
        end
      end
      seen++;
      if (seen == N_VEC) done = 1'b1;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < N_HID; n++) begin
      for (int i = 0; i < NI; i++) begin
        wh[n][i] = int'($urandom_range(0, 16000)) - 8000;
        cfg_write(CFG_HID_WEIGHT, n, i, wh[n][i], 0);
      end
      bh[n] = int'($urandom_range(0, 300000000)) - 150000000;
      cfg_write(CFG_HID_BIAS, n, 0, 0, bh[n]);
    end
    for (int o = 0; o < NO; o++) begin
      for (int n = 0; n < N_HID; n++) begin
        wo[o][n] = int'($urandom_range(0, 16000)) - 8000;
        cfg_write(CFG_OUT_WEIGHT, o, n, wo[o][n], 0);
      end
      bo[o] = int'($urandom_range(0, 300000000)) - 150000000;
      cfg_write(CFG_OUT_BIAS, o, 0, 0, bo[o]);
    end
    @(negedge clk);
    cfg_we = 1'b0;
    for (int v = 0; v < N_VEC; v++) begin
      int x [NI];
      int h [N_HID];
      for (int i = 0; i < NI; i++) x[i] = int'($urandom_range(0, 10000));
      for (int n = 0; n < N_HID; n++) begin
        longint s;
        s = bh[n];
        for (int i = 0; i < NI; i++) s += longint'(x[i]) * csd_value_dropped(wh[n][i], NZ_DROP);
        h[n] = tansig_ref(s);
      end
      for (int o = 0; o < NO; o++) begin
        longint s;
        s = bo[o];
        for (int n = 0; n < N_HID; n++) s += longint'(h[n]) * csd_value_dropped(wo[o][n], NZ_DROP);
        exp_q.push_back(tansig_ref(s));
      end
      for (int i = 0; i < NI; i++) begin
        @(negedge clk);
        load = 1'b1;
        data_in = DATA_W'(x[i]);
      end
      due_q.push_back(cycle + 2);
    end
    @(negedge clk);
    load = 1'b0;
  end

endmodule
