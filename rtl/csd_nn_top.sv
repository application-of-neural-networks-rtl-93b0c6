// csd_nn_top: feed-forward neural-network face classifier with canonical
// signed digit (CSD) coefficients.
//
// What it does: classifies one face from its 39-element feature vector
// (PCA or LDA features, computed elsewhere) with a 39-N_HID-6 network of
// tansig neurons. Every weight is stored as CSD digit masks and every
// multiplication is a CSD shift-and-add, so multipliers need at most 9
// add/subtract steps per 18-bit coefficient instead of 18.
//
// Structure (follows the document's top-level diagram): Layer 1
// (hidden_layer) takes the feature elements serially, one per `load` cycle,
// in all hidden neurons at once; its N_HID outputs (D_out) go together to
// Layer 2 (output_layer), whose N_OUT neurons are fully parallel and drive
// `data_out`. Default sizes are the document's PCA-NN: 39 inputs, 28 hidden,
// 6 outputs (its LDA-NN is N_HID = 29).
//
// Weight loading (this design's choice): with `cfg_we` high, `cfg_sel`
// selects hidden weight / hidden bias / output weight / output bias of
// neuron `cfg_neuron`, word `cfg_addr`. A weight is given as an 18-bit two's
// complement integer (real weight x 10000); csd_converter recodes it into CSD
// masks and drops its NZ_DROP lowest nonzero digits (document: reduced by
// 1..4, main results at 1) before it is stored. A bias is given at product
// scale (real bias x 1e8). The document performs the recoding offline.
//
// Timing: feed the N_IN elements of a vector on consecutive or spaced
// `load` cycles. If the last element is presented in cycle c, `out_valid` is
// high for one cycle in cycle c+2, with the N_OUT outputs (real value x
// 10000) on `data_out`. A new vector may follow
// immediately. `rst` is synchronous and active high.
module csd_nn_top
  import csd_nn_pkg::*;
#(
  parameter int unsigned N_IN    = N_IN_DEF,
  parameter int unsigned N_HID   = N_HID_DEF,
  parameter int unsigned N_OUT   = N_OUT_DEF,
  parameter int unsigned NZ_DROP = 1,
  localparam int unsigned NW     = (N_HID > N_OUT) ? $clog2(N_HID) : $clog2(N_OUT),
  localparam int unsigned AW     = (N_IN > N_HID) ? $clog2(N_IN) : $clog2(N_HID)
) (
  input  logic                        clk,
  input  logic                        rst,
  // feature input (Data_in / Load in the document)
  input  logic                        load,
  input  data_t                       data_in,
  // configuration
  input  logic                        cfg_we,
  input  cfg_sel_e                    cfg_sel,
  input  logic [NW-1:0]               cfg_neuron,
  input  logic [AW-1:0]               cfg_addr,
  input  data_t                       cfg_weight,
  input  logic signed [AF_IN_W-1:0]   cfg_bias,
  // result (Data_out)
  output data_t                       data_out [N_OUT],
  output logic                        out_valid
);

  logic [DATA_W-1:0] w_pos, w_neg;

  csd_converter #(.W(DATA_W), .DROP(NZ_DROP)) u_conv (
    .weight  (cfg_weight),
    .pos     (w_pos),
    .neg     (w_neg)
  );

  data_t d_out [N_HID];
  logic  hid_valid;

  hidden_layer #(.N_IN(N_IN), .N_HID(N_HID)) u_layer1 (
    .clk, .rst, .load, .data_in,
    .wr_weight   (cfg_we && cfg_sel == CFG_HID_WEIGHT),
    .wr_bias     (cfg_we && cfg_sel == CFG_HID_BIAS),
    .wr_neuron   ($clog2(N_HID)'(cfg_neuron)),
    .wr_addr     ($clog2(N_IN)'(cfg_addr)),
    .wr_pos      (w_pos),
    .wr_neg      (w_neg),
    .wr_bias_val (cfg_bias),
    .data_out    (d_out),
    .out_valid   (hid_valid)
  );

  output_layer #(.N_HID(N_HID), .N_OUT(N_OUT)) u_layer2 (
    .clk, .rst,
    .in_valid    (hid_valid),
    .h           (d_out),
    .wr_weight   (cfg_we && cfg_sel == CFG_OUT_WEIGHT),
    .wr_bias     (cfg_we && cfg_sel == CFG_OUT_BIAS),
    .wr_neuron   ($clog2(N_OUT)'(cfg_neuron)),
    .wr_addr     ($clog2(N_HID)'(cfg_addr)),
    .wr_pos      (w_pos),
    .wr_neg      (w_neg),
    .wr_bias_val (cfg_bias),
    .data_out    (data_out),
    .out_valid   (out_valid)
  );

  // A recoded coefficient is always canonical: no two adjacent nonzero digits.
  a_canonic: assert property (@(posedge clk) disable iff (rst)
    cfg_we |-> (((w_pos | w_neg) & ((w_pos | w_neg) >> 1)) == '0) && ((w_pos & w_neg) == '0));

endmodule
