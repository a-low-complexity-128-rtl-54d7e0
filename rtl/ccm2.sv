// ccm2: enhanced complex constant multiplier of stage 6, multiplying the
// input by W8^ks (ks = sel). sel=0 passes x+jy through; sel=1 gives
// (c*x + c*y) + j(c*y - c*x) with c = cos(pi/4) from two smu_c units and two
// adders. The adder results are rounded from G fractional bits and saturated
// (own choice). Combinational.
module ccm2 #(
  parameter int W = 10,
  parameter int G = 8
) (
  input  logic                sel,
  input  logic signed [W-1:0] in_re, in_im,
  output logic signed [W-1:0] out_re, out_im
);
  localparam int PW = W + G;
  logic signed [PW-1:0] cx, cy;
  logic signed [PW:0]   s_re, s_im;
  logic signed [W-1:0]  r_re, r_im;

  smu_c #(.W(W), .G(G)) u_smu_re (.z(in_re), .cz(cx));
  smu_c #(.W(W), .G(G)) u_smu_im (.z(in_im), .cz(cy));

  assign s_re = (PW+1)'(cx) + (PW+1)'(cy);
  assign s_im = (PW+1)'(cy) - (PW+1)'(cx);

  rnd_sat #(.IW(PW+1), .G(G), .W(W)) u_r_re (.in(s_re), .out(r_re));
  rnd_sat #(.IW(PW+1), .G(G), .W(W)) u_r_im (.in(s_im), .out(r_im));

  assign out_re = sel ? r_re : in_re;
  assign out_im = sel ? r_im : in_im;
endmodule
