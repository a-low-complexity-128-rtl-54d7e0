// bu2: type-II butterfly, a type-I butterfly (bu1) whose output to the next
// stage passes through a -j multiplication unit. sel1 is the butterfly select
// (0: pass/load, 1: sum/difference), sel2 applies -j to Out1. The -j is the
// trivial twiddle W4 of the modified radix-2^4 / radix-2^3 algorithm, applied
// in stages 1, 3 and (lanes 2, 3) 5. Combinational.
module bu2 #(
  parameter int W     = 10,
  parameter bit SCALE = 1'b0
) (
  input  logic                sel1,
  input  logic                sel2,
  input  logic signed [W-1:0] in1_re, in1_im,    // from buffer
  input  logic signed [W-1:0] in2_re, in2_im,    // new input
  output logic signed [W-1:0] out1_re, out1_im,  // to next stage
  output logic signed [W-1:0] out2_re, out2_im   // to buffer
);
  logic signed [W-1:0] b_re, b_im;

  bu1 #(.W(W), .SCALE(SCALE)) u_bu1 (
    .sel(sel1), .in1_re, .in1_im, .in2_re, .in2_im,
    .out1_re(b_re), .out1_im(b_im), .out2_re, .out2_im);

  neg_j #(.W(W)) u_mj (.en(sel2), .in_re(b_re), .in_im(b_im), .out_re(out1_re), .out_im(out1_im));
endmodule
