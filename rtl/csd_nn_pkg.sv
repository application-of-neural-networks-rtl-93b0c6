// csd_nn_pkg: widths, network sizes and number formats shared by the CSD
// neural-network classifier.
//
// Number format (follows the document): every input, weight and bias is a
// real value multiplied by 10000 and rounded to an integer, so the datapath
// carries plain two's complement integers. A product of an input and a weight
// therefore carries a scale of 10000*10000 = 1e8; the accumulated sums and the
// biases held in hardware are at that product scale (biases at 1e8 scale is
// this design's choice). Activation outputs are again at the 10000 scale so
// they can feed the next layer as 18-bit inputs.
//
// A CSD (canonical signed digit) coefficient is held as two 18-bit masks:
// `pos` has a 1 where the digit is +1, `neg` a 1 where it is -1. The value
// is pos - neg; in canonical form no two adjacent digits are nonzero.
package csd_nn_pkg;

  // Input and coefficient width (document: 18 bit).
  parameter int unsigned DATA_W = 18;
  // Multiplier product width (document: 36 bit).
  parameter int unsigned PROD_W = 2 * DATA_W;
  // Activation-function input width (document: 32-bit adder-tree output).
  parameter int unsigned AF_IN_W = 32;

  // Network sizes of the PCA-NN configuration (document: 39 features,
  // 28 hidden neurons, 6 output neurons; LDA-NN uses 29 hidden neurons).
  parameter int unsigned N_IN_DEF  = 39;
  parameter int unsigned N_HID_DEF = 28;
  parameter int unsigned N_OUT_DEF = 6;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  // One CSD coefficient as positive- and negative-digit masks.
  typedef struct packed {
    logic [DATA_W-1:0] pos;
    logic [DATA_W-1:0] neg;
  } csd_t;

  // Which store a configuration write goes to.
  typedef enum logic [1:0] {
    CFG_HID_WEIGHT = 2'd0,
    CFG_HID_BIAS   = 2'd1,
    CFG_OUT_WEIGHT = 2'd2,
    CFG_OUT_BIAS   = 2'd3
  } cfg_sel_e;

  // Width of a signed accumulator that sums `n` products without overflow.
  function automatic int unsigned acc_width(int unsigned n);
    return PROD_W + $clog2(n + 1);
  endfunction

endpackage
