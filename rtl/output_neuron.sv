// output_neuron: fully parallel neuron of the output layer.
//
// How it works (follows the document's output-neuron diagram): all N_HID
// hidden-layer outputs arrive together. One CSD multiplier per input forms
// every weighted input at once, an adder tree sums the products together
// with the bias, the sum is saturated to the 32-bit activation input and the
// tansig LUT gives the neuron output, which is registered.
//
// Interface: `h[N_HID]` and `in_valid` from the hidden layer; `w_pos`/`w_neg`
// are the neuron's stored coefficient masks (from its weight_bank); `bias` is
// at product scale (1e8). `data_out` (scale 1e4) and `out_valid` follow one
// clock after `in_valid`. Reset (synchronous) clears the output register.
// Saturation to 32 bits before the LUT and the output register are this
// design's choices.
module output_neuron
  import csd_nn_pkg::*;
#(
  parameter int unsigned N_HID = N_HID_DEF
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  data_t                     h     [N_HID],
  input  logic [DATA_W-1:0]         w_pos [N_HID],
  input  logic [DATA_W-1:0]         w_neg [N_HID],
  input  logic signed [AF_IN_W-1:0] bias,
  output data_t                     data_out,
  output logic                      out_valid
);

  localparam int unsigned SUM_W = PROD_W + $clog2(N_HID + 1);
  localparam logic signed [SUM_W-1:0] AF_MAX = SUM_W'({1'b0, {(AF_IN_W-1){1'b1}}});
  localparam logic signed [SUM_W-1:0] AF_MIN = -AF_MAX - 1;

  prod_t                     terms [N_HID+1];
  logic signed [SUM_W-1:0]   sum;
  logic signed [AF_IN_W-1:0] af_in;
  data_t                     af_out;

  for (genvar i = 0; i < N_HID; i++) begin : g_mult
    csd_multiplier #(.W(DATA_W)) u_mult (
      .x       (h[i]),
      .pos     (w_pos[i]),
      .neg     (w_neg[i]),
      .product (terms[i])
    );
  end
  assign terms[N_HID] = PROD_W'(bias);

  adder_tree #(.N(N_HID + 1), .IN_W(PROD_W), .OUT_W(SUM_W)) u_tree (
    .operand (terms),
    .sum     (sum)
  );

  assign af_in = (sum > AF_MAX) ? AF_MAX[AF_IN_W-1:0] :
                 (sum < AF_MIN) ? AF_MIN[AF_IN_W-1:0] : sum[AF_IN_W-1:0];

  tansig_lut #(.IN_W(AF_IN_W), .OUT_W(DATA_W)) u_af (
    .a (af_in),
    .y (af_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) data_out <= af_out;
    end
  end

endmodule
