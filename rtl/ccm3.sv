// ccm3: enhanced complex constant multiplier of stage 6, multiplying the
// input by -j*W8^ks (ks = sel): the CCM2 datapath (two smu_c units, two
// adders, a select) followed by the -j exchange: the real output is the
// selected imaginary path and the imaginary output the two's complement of
// the selected real path. sel=0 thus gives -j, sel=1 gives -jW8^1. Rounding
// and saturating negation are own choices. Combinational.
module ccm3 #(
  parameter int W = 10,
  parameter int G = 8
) (
  input  logic                sel,
  input  logic signed [W-1:0] in_re, in_im,
  output logic signed [W-1:0] out_re, out_im
);
  localparam int PW = W + G;
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};
  logic signed [PW-1:0] cx, cy;
  logic signed [PW:0]   s_re, s_im;
  logic signed [W-1:0]  r_re, r_im, m_re, m_im;

  smu_c #(.W(W), .G(G)) u_smu_re (.z(in_re), .cz(cx));
  smu_c #(.W(W), .G(G)) u_smu_im (.z(in_im), .cz(cy));

  assign s_re = (PW+1)'(cx) + (PW+1)'(cy);
  assign s_im = (PW+1)'(cy) - (PW+1)'(cx);

  rnd_sat #(.IW(PW+1), .G(G), .W(W)) u_r_re (.in(s_re), .out(r_re));
  rnd_sat #(.IW(PW+1), .G(G), .W(W)) u_r_im (.in(s_im), .out(r_im));

  assign m_re   = sel ? r_re : in_re;
  assign m_im   = sel ? r_im : in_im;
  assign out_re = m_im;
  assign out_im = (m_re == MINV) ? ~MINV : -m_re;
endmodule
