// rnd_sat: rounds a signed value with G fractional bits to a W-bit integer
// (round half up) and saturates it to the W-bit two's complement range.
// Used after every constant and Booth multiplier. Combinational.
module rnd_sat #(
  parameter int IW = 19,   // input width, G fractional bits included
  parameter int G  = 8,
  parameter int W  = 10
) (
  input  logic signed [IW-1:0] in,
  output logic signed [W-1:0]  out
);
  localparam logic signed [IW:0] MAXV = (IW+1)'((1 <<< (W-1)) - 1);
  localparam logic signed [IW:0] MINV = -(IW+1)'(1 <<< (W-1));

  logic signed [IW:0] r;

  always_comb begin
    r = ((IW+1)'(in) + (IW+1)'(1 <<< (G-1))) >>> G;
    if (r > MAXV)      out = MAXV[W-1:0];
    else if (r < MINV) out = MINV[W-1:0];
    else               out = r[W-1:0];
  end
endmodule
