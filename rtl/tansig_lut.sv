// tansig_lut: hyperbolic tangent activation function as a look-up table.
//
// How it works: the document realises tansig as a LUT of uniformly spaced
// input/output pairs addressed by the neuron's sum. Here the sum `a` (scale
// 1e8, see csd_nn_pkg) is folded to its magnitude, the magnitude is divided
// by 2^STEP_SHIFT to form the table address (step 2^20/1e8 = 0.0105), and the
// table returns round(OUT_SCALE * tanh(x)) at the midpoint x of that step.
// Addresses past the table end read the last entry (tanh has saturated
// there: DEPTH*step = 10.7). The sign of `a` is applied to the result, since
// tanh is odd. The table is computed at elaboration from tanh; its size,
// step and the folding are this design's choices.
//
// Interface: `a` (IN_W-bit signed sum), `y` (OUT_W-bit signed, scale
// OUT_SCALE, range -OUT_SCALE..OUT_SCALE). Combinational.
module tansig_lut #(
  parameter int unsigned IN_W       = 32,
  parameter int unsigned OUT_W      = 18,
  parameter int unsigned DEPTH      = 1024,
  parameter int unsigned STEP_SHIFT = 20,
  parameter real         IN_SCALE   = 1.0e8,
  parameter int          OUT_SCALE  = 10000
) (
  input  logic signed [IN_W-1:0]  a,
  output logic signed [OUT_W-1:0] y
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef logic [OUT_W-1:0] lut_t [DEPTH];

  function automatic lut_t build_lut();
    lut_t l;
    for (int i = 0; i < DEPTH; i++) begin
      real x;
      x    = (real'(i) + 0.5) * real'(64'(1) << STEP_SHIFT) / IN_SCALE;
      l[i] = OUT_W'($rtoi(real'(OUT_SCALE) * $tanh(x) + 0.5));
    end
    return l;
  endfunction

  localparam lut_t LUT = build_lut();

  logic [IN_W-1:0]   mag;
  logic [IN_W-1:0]   idx_full;
  logic [AW-1:0]     idx;
  logic [OUT_W-1:0]  val;

  assign mag      = a[IN_W-1] ? IN_W'(-a) : IN_W'(a);
  assign idx_full = mag >> STEP_SHIFT;
  assign idx      = (idx_full >= IN_W'(DEPTH)) ? AW'(DEPTH - 1) : idx_full[AW-1:0];
  assign val      = LUT[idx];
  assign y        = a[IN_W-1] ? -$signed(val) : $signed(val);

endmodule
