// bu1: type-I butterfly of a radix-2 single-path delay-feedback stage.
// In1 is the word coming back from the stage's feedback buffer, In2 the new
// input. With sel=0 (first half of a block) the buffered word goes on to the
// next stage (Out1) and the new input is written to the buffer (Out2). With
// sel=1 the sum In1+In2 goes on and the difference In1-In2 is written back,
// to leave the stage during the next first half.
// Word growth (own choice; the published design fixes only the 10-bit word length):
// with SCALE=1 the sum and difference are halved with round-half-up, so they
// always fit W bits; with SCALE=0 they saturate to W bits. The pass-through
// words of sel=0 are never scaled. Purely combinational.
module bu1 #(
  parameter int W     = 10,
  parameter bit SCALE = 1'b0
) (
  input  logic                sel,
  input  logic signed [W-1:0] in1_re, in1_im,    // from buffer
  input  logic signed [W-1:0] in2_re, in2_im,    // new input
  output logic signed [W-1:0] out1_re, out1_im,  // to next stage
  output logic signed [W-1:0] out2_re, out2_im   // to buffer
);
  logic signed [W-1:0] s_re, s_im, d_re, d_im;

  bf_addsub #(.W(W), .SCALE(SCALE)) u_re (.a(in1_re), .b(in2_re), .sum(s_re), .dif(d_re));
  bf_addsub #(.W(W), .SCALE(SCALE)) u_im (.a(in1_im), .b(in2_im), .sum(s_im), .dif(d_im));

  always_comb begin
    if (sel) begin
      out1_re = s_re;   out1_im = s_im;
      out2_re = d_re;   out2_im = d_im;
    end else begin
      out1_re = in1_re; out1_im = in1_im;
      out2_re = in2_re; out2_im = in2_im;
    end
  end
endmodule
