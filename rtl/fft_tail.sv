// fft_tail: the cross-path radix-2^3 stages 6 and 7.
// Stage 6 pairs the paths two apart (n6): one bu3 combines paths 0 and 2,
// another paths 1 and 3. Each result passes two pipeline registers; between
// them the results of the paths-1/3 butterfly get the twiddle W8^(n7(k5+2k6)):
// its sum (k6=0) goes through ccm2 (W8^k5), its difference (k6=1) through
// ccm3 (-j W8^k5), with k5 = ks from the controller.
// Stage 7 pairs the paths one apart (n7): the k6=0 results meet in one bu3,
// the k6=1 results in the other. Output q carries k6 = q[1], k7 = q[0], so
// output q at position t holds X(k) with 4t+q the bit reversal of k.
// Latency: 2 enabled cycles, then a combinational stage 7. Registers advance
// only with en. STAGE_SCALE bits 5 and 6 halve stages 6 and 7 (own choice).
module fft_tail #(
  parameter int       W           = 10,
  parameter int       G           = 8,
  parameter bit [6:0] STAGE_SCALE = 7'b1010101
) (
  input  logic                clk,
  input  logic                en,
  input  logic                ks,
  input  logic signed [W-1:0] in_re [4], in_im [4],
  output logic signed [W-1:0] out_re [4], out_im [4]
);
  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cplx_t;

  cplx_t a0, a1, b0, b1;      // stage-6 results: a from paths 0/2, b from paths 1/3
  cplx_t ra0, ra1, rb0, rb1;  // first register
  cplx_t mb0, mb1;            // after ccm2 / ccm3
  cplx_t sa0, sa1, sb0, sb1;  // second register

  bu3 #(.W(W), .SCALE(STAGE_SCALE[5])) u_bu_s6a (
    .in1_re(in_re[0]), .in1_im(in_im[0]), .in2_re(in_re[2]), .in2_im(in_im[2]),
    .out1_re(a0.re), .out1_im(a0.im), .out2_re(a1.re), .out2_im(a1.im));
  bu3 #(.W(W), .SCALE(STAGE_SCALE[5])) u_bu_s6b (
    .in1_re(in_re[1]), .in1_im(in_im[1]), .in2_re(in_re[3]), .in2_im(in_im[3]),
    .out1_re(b0.re), .out1_im(b0.im), .out2_re(b1.re), .out2_im(b1.im));

  ccm2 #(.W(W), .G(G)) u_ccm2 (.sel(ks),
    .in_re(rb0.re), .in_im(rb0.im), .out_re(mb0.re), .out_im(mb0.im));
  ccm3 #(.W(W), .G(G)) u_ccm3 (.sel(ks),
    .in_re(rb1.re), .in_im(rb1.im), .out_re(mb1.re), .out_im(mb1.im));

  always_ff @(posedge clk) begin
    if (en) begin
      ra0 <= a0;  ra1 <= a1;  rb0 <= b0;  rb1 <= b1;
      sa0 <= ra0; sa1 <= ra1; sb0 <= mb0; sb1 <= mb1;
    end
  end

  bu3 #(.W(W), .SCALE(STAGE_SCALE[6])) u_bu_s7a (
    .in1_re(sa0.re), .in1_im(sa0.im), .in2_re(sb0.re), .in2_im(sb0.im),
    .out1_re(out_re[0]), .out1_im(out_im[0]), .out2_re(out_re[1]), .out2_im(out_im[1]));
  bu3 #(.W(W), .SCALE(STAGE_SCALE[6])) u_bu_s7b (
    .in1_re(sa1.re), .in1_im(sa1.im), .in2_re(sb1.re), .in2_im(sb1.im),
    .out1_re(out_re[2]), .out1_im(out_im[2]), .out2_re(out_re[3]), .out2_im(out_im[3]));
endmodule
