// neg_j: the -j multiplication unit. With en=1 it maps (re, im) to
// (im, -re), i.e. multiplies by -j by exchanging the parts and taking the
// two's complement of the real part; with en=0 it passes the word through.
// Own choice: the one value whose negation does not fit, -2^(W-1), is
// negated to 2^(W-1)-1. Combinational.
module neg_j #(
  parameter int W = 10
) (
  input  logic                en,
  input  logic signed [W-1:0] in_re, in_im,
  output logic signed [W-1:0] out_re, out_im
);
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  always_comb begin
    if (en) begin
      out_re = in_im;
      out_im = (in_re == MINV) ? ~MINV : -in_re;
    end else begin
      out_re = in_re;
      out_im = in_im;
    end
  end
endmodule
