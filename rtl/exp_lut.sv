// exp_lut: e(x) = exp(-x) for x >= 0 by a lookup table plus linear
// interpolation; used for the thermal factor of the C-Mantec neurons.
//
// The table is indexed by the top NA integer and NB fractional bits of the
// unsigned fixed-point argument x (defaults 3 and 3: 64 entries of 16 bits,
// x in [0, 8) in steps of 1/8). The remaining FB-NB fractional bits
// interpolate linearly between entry k and k+1; the last segment
// interpolates toward exp(-8). For x >= 2^NA the output is 0. Entries are
// round(65535*exp(-k/2^NB)), computed at elaboration.
//
// Interface: x is an unsigned XW-bit word with FB fractional bits; y is an
// unsigned Q0.16 fraction (65535 ~ 1.0). Combinational. The method (same
// table-plus-interpolation scheme as the sigmoid) and the (NA, NB) pairs it
// may take (3/3, 3/4, 4/4, 4/5, 4/6) are the reference design's; choosing the
// 3/3 pair as default and returning 0 beyond the table are this design's.
module exp_lut #(
  parameter int XW = 16,   // width of x
  parameter int FB = 8,    // fractional bits of x
  parameter int NA = 3,
  parameter int NB = 3
) (
  input  logic [XW-1:0] x,
  output logic [15:0]   y
);
  localparam int NE = 2 ** (NA + NB);
  localparam int IF = FB - NB;
  typedef logic [15:0] tab_t [NE+1];

  function automatic tab_t build();
    tab_t tv;
    for (int k = 0; k <= NE; k++)
      tv[k] = 16'($rtoi(65535.0 * $exp(-real'(k) / real'(2 ** NB)) + 0.5));
    return tv;
  endfunction
  localparam tab_t TAB = build();

  logic [NA+NB-1:0] idx;
  logic [IF-1:0]    frac;
  logic [15:0]      y0, y1;
  logic [16+IF-1:0] step;

  always_comb begin
    idx  = x[FB+NA-1 : FB-NB];
    frac = x[IF-1:0];
    y0   = TAB[{1'b0, idx}];
    y1   = TAB[{1'b0, idx} + 1];
    step = (16+IF)'(y0 - y1) * (16+IF)'(frac);
    if (x >= XW'(2 ** (NA + FB))) y = 16'h0000;
    else                          y = y0 - 16'(step >> IF);
  end
endmodule
