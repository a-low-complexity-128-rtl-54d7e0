// fft_lane: one of the four parallel data paths (stages 1 to 5). Path LANE
// receives x(4m+LANE), m = 0..31, one sample per enabled cycle. Each stage is
// a radix-2 single-path delay-feedback stage: a butterfly with a feedback
// buffer of 16, 8, 4, 2 and 1 words, so stage s pairs samples 64/2^(s-1)
// apart in the full sequence. Stage by stage:
//   1: bu2 + 16D, -j twiddle, register
//   2: bu1 + 8D, register, ccm1 (W16 twiddles), register
//   3: bu2 + 4D, -j twiddle, register
//   4: bu1 + 2D, register, cbm (W128 twiddle), register
//   5: bu1 (paths 0, 1) or bu2 with -j (paths 2, 3) + 1D, register
// Controls come from fft_ctrl; the registers and buffers advance only when
// en is high. Latency from input to output: 38 enabled cycles; the output
// position t carries k1..k5 as t = 16k1 + 8k2 + 4k3 + 2k4 + k5.
// STAGE_SCALE bit s-1 halves the butterfly results of stage s (own choice).
module fft_lane
  import fft_pkg::*;
#(
  parameter int       W           = 10,
  parameter int       CW          = 11,
  parameter int       G           = 8,
  parameter int       LANE        = 0,
  parameter bit [6:0] STAGE_SCALE = 7'b1010101
) (
  input  logic                clk,
  input  logic                en,
  input  lane_ctrl_t          lc,
  input  logic [6:0]          tf4_e,
  input  logic signed [W-1:0] in_re, in_im,
  output logic signed [W-1:0] out_re, out_im
);
  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cplx_t;

  cplx_t fb1, wr1, bo1, r1;          // stage 1
  cplx_t fb2, wr2, bo2, r2a, m2, r2b; // stage 2
  cplx_t fb3, wr3, bo3, r3;          // stage 3
  cplx_t fb4, wr4, bo4, r4a, m4, r4b; // stage 4
  cplx_t fb5, wr5, bo5, r5;          // stage 5

  // ---- stage 1 ----
  bu2 #(.W(W), .SCALE(STAGE_SCALE[0])) u_bu_s1 (
    .sel1(lc.s1_sel), .sel2(lc.s1_mj),
    .in1_re(fb1.re), .in1_im(fb1.im), .in2_re(in_re), .in2_im(in_im),
    .out1_re(bo1.re), .out1_im(bo1.im), .out2_re(wr1.re), .out2_im(wr1.im));
  delay_line #(.W(W), .DEPTH(16)) u_fb_s1 (.clk, .en,
    .in_re(wr1.re), .in_im(wr1.im), .out_re(fb1.re), .out_im(fb1.im));

  // ---- stage 2 ----
  bu1 #(.W(W), .SCALE(STAGE_SCALE[1])) u_bu_s2 (
    .sel(lc.s2_sel),
    .in1_re(fb2.re), .in1_im(fb2.im), .in2_re(r1.re), .in2_im(r1.im),
    .out1_re(bo2.re), .out1_im(bo2.im), .out2_re(wr2.re), .out2_im(wr2.im));
  delay_line #(.W(W), .DEPTH(8)) u_fb_s2 (.clk, .en,
    .in_re(wr2.re), .in_im(wr2.im), .out_re(fb2.re), .out_im(fb2.im));
  ccm1 #(.W(W), .G(G)) u_ccm1 (.sel(lc.s2_ccm),
    .in_re(r2a.re), .in_im(r2a.im), .out_re(m2.re), .out_im(m2.im));

  // ---- stage 3 ----
  bu2 #(.W(W), .SCALE(STAGE_SCALE[2])) u_bu_s3 (
    .sel1(lc.s3_sel), .sel2(lc.s3_mj),
    .in1_re(fb3.re), .in1_im(fb3.im), .in2_re(r2b.re), .in2_im(r2b.im),
    .out1_re(bo3.re), .out1_im(bo3.im), .out2_re(wr3.re), .out2_im(wr3.im));
  delay_line #(.W(W), .DEPTH(4)) u_fb_s3 (.clk, .en,
    .in_re(wr3.re), .in_im(wr3.im), .out_re(fb3.re), .out_im(fb3.im));

  // ---- stage 4 ----
  bu1 #(.W(W), .SCALE(STAGE_SCALE[3])) u_bu_s4 (
    .sel(lc.s4_sel),
    .in1_re(fb4.re), .in1_im(fb4.im), .in2_re(r3.re), .in2_im(r3.im),
    .out1_re(bo4.re), .out1_im(bo4.im), .out2_re(wr4.re), .out2_im(wr4.im));
  delay_line #(.W(W), .DEPTH(2)) u_fb_s4 (.clk, .en,
    .in_re(wr4.re), .in_im(wr4.im), .out_re(fb4.re), .out_im(fb4.im));
  cbm #(.W(W), .CW(CW)) u_cbm (.e(tf4_e),
    .in_re(r4a.re), .in_im(r4a.im), .out_re(m4.re), .out_im(m4.im));

  // ---- stage 5: bu2 with -j where n6 = 1 (paths 2, 3), else bu1 ----
  if (LANE >= 2) begin : g_s5_bu2
    bu2 #(.W(W), .SCALE(STAGE_SCALE[4])) u_bu_s5 (
      .sel1(lc.s5_sel), .sel2(lc.s5_mj),
      .in1_re(fb5.re), .in1_im(fb5.im), .in2_re(r4b.re), .in2_im(r4b.im),
      .out1_re(bo5.re), .out1_im(bo5.im), .out2_re(wr5.re), .out2_im(wr5.im));
  end else begin : g_s5_bu1
    bu1 #(.W(W), .SCALE(STAGE_SCALE[4])) u_bu_s5 (
      .sel(lc.s5_sel),
      .in1_re(fb5.re), .in1_im(fb5.im), .in2_re(r4b.re), .in2_im(r4b.im),
      .out1_re(bo5.re), .out1_im(bo5.im), .out2_re(wr5.re), .out2_im(wr5.im));
  end
  delay_line #(.W(W), .DEPTH(1)) u_fb_s5 (.clk, .en,
    .in_re(wr5.re), .in_im(wr5.im), .out_re(fb5.re), .out_im(fb5.im));

  // ---- pipeline registers (D in the block diagram) ----
  always_ff @(posedge clk) begin
    if (en) begin
      r1  <= bo1;
      r2a <= bo2;
      r2b <= m2;
      r3  <= bo3;
      r4a <= bo4;
      r4b <= m4;
      r5  <= bo5;
    end
  end

  assign out_re = r5.re;
  assign out_im = r5.im;
endmodule
