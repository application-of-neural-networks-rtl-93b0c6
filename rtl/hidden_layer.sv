// hidden_layer: Layer 1 of the classifier, N_HID serial neurons in parallel.
//
// How it works (follows the document's hidden-layer diagram): each element
// of the feature vector, presented on `data_in` with `load`, is broadcast to
// all N_HID hidden neurons. Each neuron has its own pair of weight ROMs
// (+1 digit masks and -1 digit masks of its CSD weights, N_IN words each),
// addressed by the neuron's own counter, and its own bias. All neurons finish
// together, so the layer presents all N_HID outputs in the same cycle, with
// `out_valid`, one clock after the last element of a vector.
//
// Configuration (this design's choice; the document loads the ROMs from its
// offline flow): `wr_weight` writes masks `wr_pos`/`wr_neg` to word `wr_addr`
// of neuron `wr_neuron`'s ROM pair; `wr_bias` writes `wr_bias_val` (scale
// 1e8) to that neuron's bias register. Biases are cleared by reset, ROMs are
// not.
module hidden_layer
  import csd_nn_pkg::*;
#(
  parameter int unsigned N_IN  = N_IN_DEF,
  parameter int unsigned N_HID = N_HID_DEF
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        load,
  input  data_t                       data_in,
  // configuration
  input  logic                        wr_weight,
  input  logic                        wr_bias,
  input  logic [$clog2(N_HID)-1:0]    wr_neuron,
  input  logic [$clog2(N_IN)-1:0]     wr_addr,
  input  logic [DATA_W-1:0]           wr_pos,
  input  logic [DATA_W-1:0]           wr_neg,
  input  logic signed [AF_IN_W-1:0]   wr_bias_val,
  // results
  output data_t                       data_out [N_HID],
  output logic                        out_valid
);

  logic [N_HID-1:0] valid_n;

  for (genvar n = 0; n < N_HID; n++) begin : g_neuron
    logic [$clog2(N_IN)-1:0]   addr;
    logic [DATA_W-1:0]         w_pos, w_neg;
    logic signed [AF_IN_W-1:0] bias;
    logic                      sel;

    assign sel = (32'(wr_neuron) == n);

    weight_rom #(.DEPTH(N_IN), .W(DATA_W)) u_rom_pos (
      .clk, .we(wr_weight && sel), .waddr(wr_addr), .wdata(wr_pos),
      .raddr(addr), .rdata(w_pos)
    );

    weight_rom #(.DEPTH(N_IN), .W(DATA_W)) u_rom_neg (
      .clk, .we(wr_weight && sel), .waddr(wr_addr), .wdata(wr_neg),
      .raddr(addr), .rdata(w_neg)
    );

    always_ff @(posedge clk) begin
      if (rst)                 bias <= '0;
      else if (wr_bias && sel) bias <= wr_bias_val;
    end

    hidden_neuron #(.N_IN(N_IN)) u_neuron (
      .clk, .rst, .load, .data_in,
      .addr, .w_pos, .w_neg, .bias,
      .data_out (data_out[n]),
      .out_valid(valid_n[n])
    );
  end

  // All neurons share load and reset, so they finish in the same cycle.
  assign out_valid = valid_n[0];

  // The neurons run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (rst) (valid_n == '0) || (&valid_n));

endmodule
