// Single-rail fixed-point multiplier of the solver datapath.
//
// Combinational signed multiply of two W-bit numbers with FRAC fraction
// bits: y = (a * b) >> FRAC, truncated to W bits (two's complement
// wrap-around). As for the ALU, the matched delay of the multiplier's
// acknowledge generator covers its delay (bundled data). The number format
// is this design's own choice; the document only names multipliers as
// functional units.
module multiplier #(
  parameter int W    = 16,
  parameter int FRAC = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  logic signed [2*W-1:0] p;

  assign p = $signed(a) * $signed(b);
  assign y = p[FRAC +: W];

  logic unused_bits;
  assign unused_bits = ^{p[2*W-1:FRAC+W], p[(FRAC > 0 ? FRAC : 1)-1:0]};
endmodule
