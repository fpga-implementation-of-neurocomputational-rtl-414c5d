// sigmoid_lut: logistic function g(h) = 1/(1+exp(-h)) by a lookup table plus
// linear interpolation.
//
// The table is indexed by the top bits of the signed fixed-point potential h:
// one sign bit, NA integer bits and NB fractional bits (defaults 3 and 2, so
// 2^6 = 64 entries of 16 bits, covering h in [-8, 8) in steps of 0.25). The
// remaining FB-NB fractional bits of h interpolate linearly between entry k
// and entry k+1; the last segment interpolates toward g(8). Outside [-8, 8)
// the output saturates to 0 or to 65535. Entries are round(65535*g(x_k)),
// x_k = (k - 2^(NA+NB)) / 2^NB, computed at elaboration.
//
// Interface: h is a signed WW-bit word with FB fractional bits; y is an
// unsigned Q0.16 fraction. Purely combinational (one table read, one small
// multiply, one add). The table geometry (sign + 3 + 2 bits, 64 x 16 bit) is
// the reference design's; the endpoint handling and the saturation are this
// design's choices.
module sigmoid_lut #(
  parameter int WW = 16,   // width of h
  parameter int FB = 8,    // fractional bits of h
  parameter int NA = 3,    // integer bits of the table index
  parameter int NB = 2     // fractional bits of the table index
) (
  input  logic signed [WW-1:0] h,
  output logic        [15:0]   y
);
  localparam int NE = 2 ** (1 + NA + NB);      // table entries
  localparam int IF = FB - NB;                 // interpolation bits
  typedef logic [15:0] tab_t [NE+1];

  function automatic tab_t build();
    tab_t tv;
    for (int k = 0; k <= NE; k++) begin
      real x;
      x = real'(k - NE / 2) / real'(2 ** NB);
      tv[k] = 16'($rtoi(65535.0 / (1.0 + $exp(-x)) + 0.5));
    end
    return tv;
  endfunction
  localparam tab_t TAB = build();

  logic signed [WW-1:0] lim_hi, lim_lo;
  logic [NA+NB:0]       idx;        // two's complement table index
  logic [IF-1:0]        frac;
  logic [15:0]          y0, y1;
  logic [16+IF-1:0]     step;

  assign lim_hi = WW'(2 ** (NA + FB));          // +2^NA in fixed point
  assign lim_lo = -lim_hi;

  always_comb begin
    idx  = h[FB+NA : FB-NB];
    frac = h[IF-1:0];
    // offset-binary address: flip the sign bit
    y0   = TAB[{1'b0, ~idx[NA+NB], idx[NA+NB-1:0]}];
    y1   = TAB[{1'b0, ~idx[NA+NB], idx[NA+NB-1:0]} + 1];
    step = (16+IF)'(y1 - y0) * (16+IF)'(frac);
    if (h >= lim_hi)      y = 16'hFFFF;
    else if (h < lim_lo)  y = 16'h0000;
    else                  y = y0 + 16'(step >> IF);
  end
endmodule
