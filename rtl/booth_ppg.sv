// booth_ppg: partial-product generator and adder of one real product of the
// complex Booth multiplier. For each Booth digit of the coefficient it forms
// 0, +-x or +-2x, shifts it by two bits per digit and adds all partial
// products, giving the exact product x * coef in W+CW bits. Truncation to
// the word length is left to the caller (own choice: the fixed-width error
// compensation of the original multiplier is not reproduced; the caller
// rounds the full product instead). Combinational.
module booth_ppg
  import fft_pkg::*;
#(
  parameter int W  = 10,
  parameter int CW = 11,
  parameter int ND = (CW + 1) / 2
) (
  input  logic signed [W-1:0]    x,
  input  booth_dig_t             dig [ND],
  output logic signed [W+CW-1:0] prod
);
  localparam int PW = W + CW;
  logic signed [PW-1:0] pp, acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < ND; i++) begin
      if (dig[i].two)      pp = PW'(x) <<< 1;
      else if (dig[i].one) pp = PW'(x);
      else                 pp = '0;
      if (dig[i].neg) pp = -pp;
      acc = acc + (pp <<< (2 * i));
    end
    prod = acc;
  end
endmodule
