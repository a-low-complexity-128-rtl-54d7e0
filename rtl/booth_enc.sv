// booth_enc: radix-4 (modified) Booth encoder of a CW-bit two's complement
// coefficient. Digit i looks at bits 2i+1, 2i and 2i-1 (bit -1 is 0) and
// is one of 0, +-1, +-2, encoded as {neg, one, two}; the coefficient equals
// sum(digit_i * 4^i). One encoder serves the two partial-product generators
// that use the same coefficient. Combinational.
module booth_enc
  import fft_pkg::*;
#(
  parameter int CW = 11,
  parameter int ND = (CW + 1) / 2
) (
  input  logic signed [CW-1:0] coef,
  output booth_dig_t           dig [ND]
);
  logic [2*ND:0] ext;   // coefficient sign-extended to 2*ND bits, with a 0 below

  assign ext = {(2*ND)'(coef), 1'b0};

  always_comb begin
    for (int i = 0; i < ND; i++) begin
      unique case (ext[2*i +: 3])
        3'b000, 3'b111: dig[i] = '{neg: 1'b0, one: 1'b0, two: 1'b0};
        3'b001, 3'b010: dig[i] = '{neg: 1'b0, one: 1'b1, two: 1'b0};
        3'b011:         dig[i] = '{neg: 1'b0, one: 1'b0, two: 1'b1};
        3'b100:         dig[i] = '{neg: 1'b1, one: 1'b0, two: 1'b1};
        3'b101, 3'b110: dig[i] = '{neg: 1'b1, one: 1'b1, two: 1'b0};
      endcase
    end
  end
endmodule
