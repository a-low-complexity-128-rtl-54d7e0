// smu_c: substructure-sharing multiplication unit of the enhanced CCM2 and
// CCM3: cz = z * cos(pi/4) with the 10-bit coefficient 0.101101010b, built
// from three adders: B1 = z/2 + z/8 (the pattern 101), B2 = B1 + B1/8 (the
// pattern repeated), cz = B2 + z/256. The network follows the published
// one; extending z by G fractional bits first is an own choice, and the
// output keeps them (value = z*c*2^G). Combinational.
module smu_c #(
  parameter int W = 10,
  parameter int G = 8
) (
  input  logic signed [W-1:0]   z,
  output logic signed [W+G-1:0] cz
);
  logic signed [W+G-1:0] zx, b1, b2;

  always_comb begin
    zx = (W+G)'(z) <<< G;
    b1 = (zx >>> 1) + (zx >>> 3);
    b2 = b1 + (b1 >>> 3);
    cz = b2 + (zx >>> 8);
  end
endmodule
