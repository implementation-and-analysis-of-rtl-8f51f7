// Fixed-point bilinear interpolation of four neighbouring pixels.
//
// With the fractional position (fx, fy) in units of 1/2**FRAC, the result is
//   ( p00*(S-fx)*(S-fy) + p01*fx*(S-fy) + p10*(S-fx)*fy + p11*fx*fy + S*S/2 )
//     >> (2*FRAC),   S = 2**FRAC
// i.e. the weighted mean of the four pixels, rounded to nearest. p00 is the
// pixel at (x0, y0), p01 at (x0+1, y0), p10 at (x0, y0+1), p11 at
// (x0+1, y0+1). Combinational. Five fractional bits follow the document's map
// format; the rounding is this design's choice.
module bilinear_interp #(
  parameter int unsigned FRAC = 5
) (
  input  logic [7:0]      p00,
  input  logic [7:0]      p01,
  input  logic [7:0]      p10,
  input  logic [7:0]      p11,
  input  logic [FRAC-1:0] fx,
  input  logic [FRAC-1:0] fy,
  output logic [7:0]      pix
);
  localparam int unsigned S  = 1 << FRAC;
  localparam int unsigned XW = 8 + 2 * FRAC + 2;
  logic [FRAC:0] wx0, wx1, wy0, wy1;
  logic [XW-1:0] acc;

  always_comb begin
    wx1 = (FRAC+1)'(fx);
    wy1 = (FRAC+1)'(fy);
    wx0 = (FRAC+1)'(S) - wx1;
    wy0 = (FRAC+1)'(S) - wy1;
    acc = XW'(p00) * XW'(wx0) * XW'(wy0)
        + XW'(p01) * XW'(wx1) * XW'(wy0)
        + XW'(p10) * XW'(wx0) * XW'(wy1)
        + XW'(p11) * XW'(wx1) * XW'(wy1)
        + XW'(S * S / 2);
    pix = 8'(acc >> (2 * FRAC));
  end
endmodule
