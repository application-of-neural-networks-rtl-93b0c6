// hidden_neuron: serial multiply-accumulate neuron of the hidden layer.
//
// How it works (follows the document): the feature vector arrives one
// element per `load` cycle on `data_in`, broadcast to every hidden neuron.
// The neuron's input counter drives `addr` to its two weight ROMs, which
// return the +1 and -1 digit masks of the matching CSD weight; the CSD
// multiplier forms the 36-bit weighted input and it is added to the
// accumulator register. With the last element (counter = N_IN-1) the
// accumulator, that element's product and the bias are summed, saturated to
// the 32-bit activation input, passed through the tansig LUT and registered
// on `data_out`. The accumulator and counter then return to zero, so the next
// vector may start in the very next cycle.
//
// Interface: `load` marks a valid `data_in`; `addr` -> weight ROMs,
// `w_pos`/`w_neg` <- their outputs (same cycle); `bias` is the neuron bias
// at product scale (1e8). `data_out` (scale 1e4) is valid while `out_valid`
// is high, for one cycle, one clock after the last element was loaded.
// Timing: one element per clock; result one clock after the last element.
// Reset (synchronous, active high) clears the counter, accumulator and
// output; the saturation, the accumulator width and the bias scale are this
// design's choices.
module hidden_neuron
  import csd_nn_pkg::*;
#(
  parameter int unsigned N_IN = N_IN_DEF
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        load,
  input  data_t                       data_in,
  output logic [$clog2(N_IN)-1:0]     addr,
  input  logic [DATA_W-1:0]           w_pos,
  input  logic [DATA_W-1:0]           w_neg,
  input  logic signed [AF_IN_W-1:0]   bias,
  output data_t                       data_out,
  output logic                        out_valid
);

  localparam int unsigned ACC_W = acc_width(N_IN);
  localparam int unsigned SUM_W = ACC_W + 1;
  localparam logic signed [SUM_W-1:0] AF_MAX = SUM_W'({1'b0, {(AF_IN_W-1){1'b1}}});
  localparam logic signed [SUM_W-1:0] AF_MIN = -AF_MAX - 1;

  logic [$clog2(N_IN)-1:0]   cnt;
  logic signed [ACC_W-1:0]   acc;
  prod_t                     prod;
  logic signed [SUM_W-1:0]   sum;
  logic signed [AF_IN_W-1:0] af_in;
  data_t                     af_out;
  logic                      last;

  assign addr = cnt;
  assign last = (32'(cnt) == N_IN - 1);

  csd_multiplier #(.W(DATA_W)) u_mult (
    .x       (data_in),
    .pos     (w_pos),
    .neg     (w_neg),
    .product (prod)
  );

  // Final sum of the vector: accumulator + last product + bias, saturated.
  assign sum   = SUM_W'(acc) + SUM_W'(prod) + SUM_W'(bias);
  assign af_in = (sum > AF_MAX) ? AF_MAX[AF_IN_W-1:0] :
                 (sum < AF_MIN) ? AF_MIN[AF_IN_W-1:0] : sum[AF_IN_W-1:0];

  tansig_lut #(.IN_W(AF_IN_W), .OUT_W(DATA_W)) u_af (
    .a (af_in),
    .y (af_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      acc       <= '0;
      data_out  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (load) begin
        if (last) begin
          data_out  <= af_out;
          out_valid <= 1'b1;
          acc       <= '0;
          cnt       <= '0;
        end else begin
          acc <= acc + ACC_W'(prod);
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
