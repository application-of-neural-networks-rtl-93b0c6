// weight_bank: coefficient store of one output-layer neuron, read all at
// once.
//
// The output layer is fully parallel: every one of a neuron's multipliers
// needs its coefficient in the same cycle, so the store (document: a 28x18
// weight ROM per output neuron) presents all words at its outputs together.
// A CSD coefficient is kept as a +1 digit mask and a -1 digit mask.
//
// Contents are written one coefficient per clock through `we`, `waddr`,
// `wpos`, `wneg` before operation and are not cleared by reset (the document
// loads them from its offline training flow; the write port is this design's
// choice). Outputs `pos[i]`/`neg[i]` are the stored masks of word i.
module weight_bank #(
  parameter int unsigned DEPTH = 28,
  parameter int unsigned W     = 18
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wpos,
  input  logic [W-1:0]             wneg,
  output logic [W-1:0]             pos [DEPTH],
  output logic [W-1:0]             neg [DEPTH]
);

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) begin
      pos[waddr] <= wpos;
      neg[waddr] <= wneg;
    end
  end

endmodule
