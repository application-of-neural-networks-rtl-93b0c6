// csd_multiplier: binary multiplicand times a CSD coefficient, by shift and
// add/subtract.
//
// How it works (follows the document's block diagram): the multiplicand is
// sign-extended to the product width (`shift1`) and a copy shifted left by
// one is made (`shift2`). The coefficient's digits are taken two at a time,
// from the LSB. Because a canonical coefficient never has two adjacent
// nonzero digits, each pair holds at most one nonzero digit, so each pair
// costs a single add or subtract: of shift1 when the lower digit of the pair
// is nonzero, of shift2 when the upper one is, subtracting when the digit is
// -1. The first pair forms the initial value `din`; each following stage
// shifts shift1/shift2 left by two, moves on to the next digit pair, and adds
// or subtracts into the running sum. An 18-digit coefficient needs 9 pairs:
// `din` and 8 add/subtract stages. The circuit holds no registers.
//
// Interface: `x` (W-bit two's complement multiplicand), `pos`/`neg` digit
// masks (+1 / -1 digits; coefficient = pos - neg), `product` (2W bits).
// Timing: combinational.
//
// Precondition: the masks are canonical (no two adjacent nonzero digits and
// no digit set in both masks). Non-canonical masks give a wrong product;
// csd_converter always produces canonical masks.
module csd_multiplier #(
  parameter int unsigned W = 18
) (
  input  logic signed [W-1:0]   x,
  input  logic        [W-1:0]   pos,
  input  logic        [W-1:0]   neg,
  output logic signed [2*W-1:0] product
);

  localparam int unsigned PW    = 2 * W;
  localparam int unsigned PAIRS = (W + 1) / 2;

  // Masks padded to an even number of digits.
  logic [2*PAIRS-1:0] data_m, sign_m;
  assign data_m = (2*PAIRS)'(pos);
  assign sign_m = (2*PAIRS)'(neg);

  logic signed [PW-1:0] sh1   [PAIRS];
  logic signed [PW-1:0] sh2   [PAIRS];
  logic signed [PW-1:0] dout  [PAIRS];

  // One pair of digits -> signed partial product (at most one nonzero digit).
  function automatic logic signed [PW-1:0] pair_term(
    input logic signed [PW-1:0] s1,
    input logic signed [PW-1:0] s2,
    input logic [1:0]           d,
    input logic [1:0]           s
  );
    logic signed [PW-1:0] operand;
    logic                 sub;
    operand = (d[0] | s[0]) ? s1 : s2;
    sub     = (d[0] | s[0]) ? s[0] : s[1];
    if ((d | s) == 2'b00) return '0;
    return sub ? -operand : operand;
  endfunction

  assign sh1[0]  = PW'(x);
  assign sh2[0]  = PW'(x) <<< 1;
  // din: value of the first digit pair.
  assign dout[0] = pair_term(sh1[0], sh2[0], data_m[1:0], sign_m[1:0]);

  for (genvar k = 1; k < PAIRS; k++) begin : g_stage
    assign sh1[k]  = sh1[k-1] <<< 2;
    assign sh2[k]  = sh2[k-1] <<< 2;
    assign dout[k] = dout[k-1]
                   + pair_term(sh1[k], sh2[k], data_m[2*k+1 -: 2], sign_m[2*k+1 -: 2]);
  end

  assign product = dout[PAIRS-1];

endmodule
