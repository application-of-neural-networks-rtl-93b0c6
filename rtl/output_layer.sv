// output_layer: Layer 2 of the classifier, N_OUT fully parallel neurons.
//
// How it works (follows the document): the N_HID hidden outputs, valid
// together, go to every output neuron; each neuron has its own coefficient
// store (weight_bank, N_HID words) and bias, multiplies all inputs at once
// and produces its output one clock after `in_valid`. The N_OUT outputs
// (document: 6) are the network result.
//
// Configuration (this design's choice): `wr_weight` writes masks
// `wr_pos`/`wr_neg` to word `wr_addr` of neuron `wr_neuron`'s store;
// `wr_bias` writes `wr_bias_val` (scale 1e8) to that neuron's bias register.
// Biases are cleared by reset, the stores are not.
module output_layer
  import csd_nn_pkg::*;
#(
  parameter int unsigned N_HID = N_HID_DEF,
  parameter int unsigned N_OUT = N_OUT_DEF
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  input  data_t                       h [N_HID],
  // configuration
  input  logic                        wr_weight,
  input  logic                        wr_bias,
  input  logic [$clog2(N_OUT)-1:0]    wr_neuron,
  input  logic [$clog2(N_HID)-1:0]    wr_addr,
  input  logic [DATA_W-1:0]           wr_pos,
  input  logic [DATA_W-1:0]           wr_neg,
  input  logic signed [AF_IN_W-1:0]   wr_bias_val,
  // results
  output data_t                       data_out [N_OUT],
  output logic                        out_valid
);

  logic [N_OUT-1:0] valid_n;

  for (genvar n = 0; n < N_OUT; n++) begin : g_neuron
    logic [DATA_W-1:0]         w_pos [N_HID];
    logic [DATA_W-1:0]         w_neg [N_HID];
    logic signed [AF_IN_W-1:0] bias;
    logic                      sel;

    assign sel = (32'(wr_neuron) == n);

    weight_bank #(.DEPTH(N_HID), .W(DATA_W)) u_bank (
      .clk, .we(wr_weight && sel), .waddr(wr_addr),
      .wpos(wr_pos), .wneg(wr_neg), .pos(w_pos), .neg(w_neg)
    );

    always_ff @(posedge clk) begin
      if (rst)                 bias <= '0;
      else if (wr_bias && sel) bias <= wr_bias_val;
    end

    output_neuron #(.N_HID(N_HID)) u_neuron (
      .clk, .rst, .in_valid, .h, .w_pos, .w_neg, .bias,
      .data_out (data_out[n]),
      .out_valid(valid_n[n])
    );
  end

  // All neurons share in_valid and reset, so they finish in the same cycle.
  assign out_valid = valid_n[0];

  a_lockstep: assert property (@(posedge clk) disable iff (rst) (valid_n == '0) || (&valid_n));

endmodule
