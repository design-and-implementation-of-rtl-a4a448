// rrc_pkg: constants and the coefficient generator shared by the RRC FIR
// interpolation filter.
//
// The filter is a square-root raised-cosine pulse-shaping interpolator:
// interpolation factor 4, roll-off 0.22, a prototype spanning +/-6 symbols
// (2*6*4+1 = 49 taps), of which a centred rectangular window of 7 taps is
// kept. These numbers are the design's own; the prototype normalisation and
// the fixed-point format are this implementation's choice.
//
// PROTO holds the symmetric half of the 49-tap prototype, h(k/4) for
// k = 0..24, with t in symbol periods and
//   h(0) = 1 - b + 4b/pi
//   h(t) = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))] / [pi t (1 - (4 b t)^2)]
// (b = 0.22; t = +/-1/(4b) is never a multiple of 1/4 here), divided by h(0)
// so that the centre tap is exactly 1.0, and rounded to signed Q2.30.
// coef_q() rounds an entry to a W-bit signed Q2.(W-2) word, so the centre tap
// of a W-bit coefficient set is 2^(W-2). Every word length from 8 to 32 bits
// is derived from the same table.
package rrc_pkg;

  localparam int unsigned INTERP_L   = 4;   // interpolation factor
  localparam int unsigned PROTO_TAPS = 49;  // taps of the full prototype
  localparam int unsigned PROTO_HALF = 25;  // k = 0..24
  localparam int unsigned WIN_TAPS   = 7;   // rectangular window kept

  typedef logic signed [31:0] proto_t;

  localparam proto_t PROTO [PROTO_HALF] = '{
     32'sd1073741824,  // k = 0
     32'sd950681757,   // k = 1
     32'sd633158914,   // k = 2
     32'sd249779444,   // k = 3
    -32'sd58060493,    // k = 4
    -32'sd202363063,   // k = 5
    -32'sd181564900,   // k = 6
    -32'sd66105376,    // k = 7
     32'sd50144492,    // k = 8
     32'sd101752289,   // k = 9
     32'sd78227825,    // k = 10
     32'sd15081057,    // k = 11
    -32'sd38671705,    // k = 12
    -32'sd53011608,    // k = 13
    -32'sd30250729,    // k = 14
     32'sd4667491,     // k = 15
     32'sd25763938,    // k = 16
     32'sd23140069,    // k = 17
     32'sd5484501,     // k = 18
    -32'sd10478361,    // k = 19
    -32'sd13611243,    // k = 20
    -32'sd4988121,     // k = 21
     32'sd5688699,     // k = 22
     32'sd9242194,     // k = 23
     32'sd3967969      // k = 24
  };

  // Distance (in output samples) of tap j of an ntaps-long centred window
  // from the window centre.
  function automatic int unsigned tap_offset(int unsigned ntaps, int unsigned j);
    int c;
    c = int'(ntaps - 1) / 2;
    return (int'(j) >= c) ? int'(j) - c : c - int'(j);
  endfunction

  // Coefficient of tap j of an ntaps window, rounded to w bits (w in 2..32),
  // Q2.(w-2), returned sign-extended to 64 bits.
  function automatic longint coef_q(int unsigned w, int unsigned ntaps, int unsigned j);
    longint p;
    int unsigned sh;
    p  = longint'(PROTO[tap_offset(ntaps, j)]);
    sh = 32 - w;
    if (sh == 0) return p;
    return (p + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction

endpackage
