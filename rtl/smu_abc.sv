// smu_abc: substructure-sharing multiplication unit of the enhanced CCM1.
// It multiplies a real input y by the three 10-bit coefficients
//   a = cos(pi/8) = 0.111011001b, b = sin(pi/8) = 0.011000011b,
//   c = cos(pi/4) = 0.101101010b
// with six adders and eight right shifts by sharing the sub-terms
//   A1 = y/2 + y/4,  A2 = A1 + A1/16,  A3 = y/2 + y/128,  A4 = A1 + A1/64:
//   by = A4/2,  cy = A2/4 + A3,  ay = A2 + A3/4.
// The shift network follows the published one. Own choice: y is first
// extended by G fractional bits so that the shifts drop less precision; the
// outputs keep those G fractional bits (value = y*coef*2^G) and the user
// rounds. Combinational.
module smu_abc #(
  parameter int W = 10,
  parameter int G = 8
) (
  input  logic signed [W-1:0]   y,
  output logic signed [W+G-1:0] ay, by, cy
);
  logic signed [W+G-1:0] yx, a1, a2, a3, a4;

  always_comb begin
    yx = (W+G)'(y) <<< G;
    a1 = (yx >>> 1) + (yx >>> 2);   // y * 0.11b
    a2 = a1 + (a1 >>> 4);           // y * 0.11b * 1.0001b
    a3 = (yx >>> 1) + (yx >>> 7);   // y * 0.1b  * 1.000001b
    a4 = a1 + ((a1 >>> 4) >>> 2);   // y * 0.11b * 1.000001b
    by = a4 >>> 1;
    cy = (a2 >>> 2) + a3;
    ay = a2 + (a3 >>> 2);
  end
endmodule
