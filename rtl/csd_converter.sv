// csd_converter: two's complement weight -> canonical signed digit (CSD)
// masks, with optional removal of the least significant nonzero digits.
//
// How it works: Reitwiesner's right-to-left recoding, as tabulated in the
// document. Starting from carry c0 = 0 at the LSB, digit i has magnitude
// b[i] xor c[i] and the next carry is c[i+1] = b[i]&c[i] | b[i+1]&(b[i]|c[i]);
// the digit is -1 when it is nonzero and produces a carry, +1 otherwise.
// The word is sign-extended (b[W] = b[W-1]), so a W-bit two's complement
// number always fits in W CSD digits and no two adjacent digits are nonzero.
// The document then reduces the coefficients by "N nonzero elements": its
// worked examples (22355 -> 22356, 22352, 22336, 22272) show that the N
// lowest nonzero digits are dropped. DROP gives N; DROP = 1 is the
// configuration the document reports its hardware results for.
//
// Interface: `weight` in, `pos`/`neg` digit masks out (value = pos - neg).
// Purely combinational.
//
// In the document this conversion runs offline before the masks are loaded
// into the weight ROMs; placing it in hardware, on the weight-load path, is
// this design's choice.
module csd_converter #(
  parameter int unsigned W    = 18,
  parameter int unsigned DROP = 1
) (
  input  logic signed [W-1:0]       weight,
  output logic        [W-1:0]       pos,
  output logic        [W-1:0]       neg
);

  logic [W-1:0] pos_full, neg_full;

  // Reitwiesner recoding (document Table 1).
  always_comb begin
    logic c, bn, mag;
    c = 1'b0;
    pos_full = '0;
    neg_full = '0;
    for (int i = 0; i < W; i++) begin
      bn  = (i == W - 1) ? weight[W-1] : weight[i+1];
      mag = weight[i] ^ c;
      c   = (weight[i] & c) | (bn & (weight[i] | c));
      // A nonzero digit that also carries out is -1 (b + c - 2*c_next).
      pos_full[i] = mag & ~c;
      neg_full[i] = mag & c;
    end
  end

  // Drop the DROP least significant nonzero digits.
  always_comb begin
    int unsigned seen;
    seen    = 0;
    pos     = pos_full;
    neg     = neg_full;
    for (int i = 0; i < W; i++) begin
      if (pos_full[i] | neg_full[i]) begin
        if (seen < DROP) begin
          pos[i] = 1'b0;
          neg[i] = 1'b0;
          seen   = seen + 1;
        end
      end
    end
  end

endmodule
