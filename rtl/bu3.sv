// bu3: type-III butterfly, a plain radix-2 butterfly: Out1 = In1 + In2,
// Out2 = In1 - In2, used in the cross-lane stages 6 and 7. Word growth as in
// bu1: SCALE=1 halves with round-half-up, SCALE=0 saturates. Combinational.
module bu3 #(
  parameter int W     = 10,
  parameter bit SCALE = 1'b0
) (
  input  logic signed [W-1:0] in1_re, in1_im,
  input  logic signed [W-1:0] in2_re, in2_im,
  output logic signed [W-1:0] out1_re, out1_im,
  output logic signed [W-1:0] out2_re, out2_im
);
  bf_addsub #(.W(W), .SCALE(SCALE)) u_re (.a(in1_re), .b(in2_re), .sum(out1_re), .dif(out2_re));
  bf_addsub #(.W(W), .SCALE(SCALE)) u_im (.a(in1_im), .b(in2_im), .sum(out1_im), .dif(out2_im));
endmodule
