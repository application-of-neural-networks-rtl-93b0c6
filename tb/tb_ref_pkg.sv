// tb_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL.
//
// - naf_digits: canonical signed digit form by the classic non-adjacent-form
//   rule (an odd x takes digit 2 - (x mod 4), then x = (x - d) / 2), not by
//   the carry table the RTL uses.
// - csd_value_dropped: value of a weight after its `drop` lowest nonzero CSD
//   digits are removed.
// - tansig_ref: expected activation output: saturate the sum to 32 bits, then
//   look up round(1e4 * tanh(midpoint of the 2^20-wide input step)).
package tb_ref_pkg;

  // Digit i of the CSD form of x (-1, 0, +1) for i < 40.
  typedef int digits_t [40];

  function automatic digits_t naf_digits(longint x);
    digits_t d;
    longint  v;
    v = x;
    for (int i = 0; i < 40; i++) begin
      if (v % 2 != 0) begin
        longint m;
        m = v % 4;
        if (m < 0) m += 4;
        d[i] = (m == 1) ? 1 : -1;
        v = (v - d[i]) / 2;
      end else begin
        d[i] = 0;
        v = v / 2;
      end
    end
    return d;
  endfunction

  function automatic int nonzero_count(longint x);
    digits_t d;
    int n;
    d = naf_digits(x);
    n = 0;
    for (int i = 0; i < 40; i++) if (d[i] != 0) n++;
    return n;
  endfunction

  function automatic longint csd_value_dropped(longint x, int drop);
    digits_t d;
    longint  v;
    int      seen;
    d = naf_digits(x);
    v = 0;
    seen = 0;
    for (int i = 0; i < 40; i++) begin
      if (d[i] != 0) begin
        if (seen < drop) seen++;
        else v += longint'(d[i]) * (longint'(1) << i);
      end
    end
    return v;
  endfunction

  // Canonical masks of x with `drop` lowest nonzero digits removed (18 digits).
  function automatic void csd_masks(longint x, int drop, output logic [17:0] pos,
                                    output logic [17:0] neg);
    digits_t d;
    int      seen;
    d = naf_digits(x);
    pos = '0;
    neg = '0;
    seen = 0;
    for (int i = 0; i < 18; i++) begin
      if (d[i] != 0) begin
        if (seen < drop) seen++;
        else if (d[i] > 0) pos[i] = 1'b1;
        else neg[i] = 1'b1;
      end
    end
  endfunction

  function automatic longint sat32(longint s);
    if (s > 64'sd2147483647)  return 64'sd2147483647;
    if (s < -64'sd2147483648) return -64'sd2147483648;
    return s;
  endfunction

  function automatic int tansig_ref(longint s);
    longint a, mag, idx;
    real    xr;
    int     val;
    a   = sat32(s);
    mag = (a < 0) ? -a : a;
    idx = mag / 1048576;
    if (idx > 1023) idx = 1023;
    xr  = (real'(idx) + 0.5) * 1048576.0 / 1.0e8;
    val = $rtoi(10000.0 * $tanh(xr) + 0.5);
    return (a < 0) ? -val : val;
  endfunction

  // True when the sum lies past the end of the activation table.
  function automatic bit tansig_saturates(longint s);
    longint a, mag;
    a   = sat32(s);
    mag = (a < 0) ? -a : a;
    return (mag / 1048576) > 1023;
  endfunction

endpackage
