// weight_rom: per-neuron coefficient store of the hidden layer, one word per
// neuron input.
//
// Each hidden neuron owns two of these (the document's Weight_pos and
// Weight_neg ROMs): one holds the +1 digit mask of every CSD weight, the
// other the -1 digit mask. Depth equals the number of neuron inputs
// (document: 39 words of 18 bits).
//
// The document fills the ROMs from its offline training flow; here the
// contents are written through a simple write port (`we`, `waddr`, `wdata`,
// one word per clock) before operation, and are not cleared by reset. The
// read is asynchronous, as a LUT-based distributed ROM: `rdata` follows
// `raddr` in the same cycle. These are this design's choices.
module weight_rom #(
  parameter int unsigned DEPTH = 39,
  parameter int unsigned W     = 18
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
