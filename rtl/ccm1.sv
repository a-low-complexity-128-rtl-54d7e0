// ccm1: enhanced complex constant multiplier of stage 2. It multiplies the
// complex input x+jy by one of the seven stage-2 twiddle factors 1, W8^1, -j,
// -jW8^1, W16^1, W16^3, -W16^1 using two substructure-sharing units (smu_abc)
// instead of six real multipliers.
//   sel1: swap Re/Im at the input, giving y1, y2
//   sel2: use c*y1, c*y2 (cos(pi/4)) instead of a*y1, b*y2 / a*y2, b*y1
//   sel3: take the adder results P = m(a|c)*y1 + m(b|c)*y2,
//         Q = m(a|c)*y2 - m(b|c)*y1, instead of (y1, y2)
//   sel4: output (P,Q), (-P,-Q), (Q,-P) or (P,-Q) for 0..3
// The select word per factor is fft_pkg::ccm1_decode (select table of the
// design). The structure follows the published enhanced CCM1; rounding of
// the G extra fractional bits after sel3 and saturating negation are own
// choices. Combinational.
module ccm1
  import fft_pkg::*;
#(
  parameter int W = 10,
  parameter int G = 8
) (
  input  ccm1_sel_t           sel,
  input  logic signed [W-1:0] in_re, in_im,
  output logic signed [W-1:0] out_re, out_im
);
  localparam int PW = W + G;
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  logic signed [W-1:0]  y1, y2;
  logic signed [PW-1:0] ay1, by1, cy1, ay2, by2, cy2;
  logic signed [PW:0]   p_sum, q_sum, p_full, q_full;
  logic signed [W-1:0]  p, q;

  function automatic logic signed [W-1:0] neg(logic signed [W-1:0] v);
    return (v == MINV) ? ~MINV : -v;
  endfunction

  assign y1 = sel.sel1 ? in_im : in_re;
  assign y2 = sel.sel1 ? in_re : in_im;

  smu_abc #(.W(W), .G(G)) u_smu1 (.y(y1), .ay(ay1), .by(by1), .cy(cy1));
  smu_abc #(.W(W), .G(G)) u_smu2 (.y(y2), .ay(ay2), .by(by2), .cy(cy2));

  always_comb begin
    p_sum  = (PW+1)'(sel.sel2 ? cy1 : ay1) + (PW+1)'(sel.sel2 ? cy2 : by2);
    q_sum  = (PW+1)'(sel.sel2 ? cy2 : ay2) - (PW+1)'(sel.sel2 ? cy1 : by1);
    p_full = sel.sel3 ? p_sum : ((PW+1)'(y1) <<< G);
    q_full = sel.sel3 ? q_sum : ((PW+1)'(y2) <<< G);
  end

  rnd_sat #(.IW(PW+1), .G(G), .W(W)) u_rp (.in(p_full), .out(p));
  rnd_sat #(.IW(PW+1), .G(G), .W(W)) u_rq (.in(q_full), .out(q));

  always_comb begin
    unique case (sel.sel4)
      2'd0: begin out_re = p;      out_im = q;      end
      2'd1: begin out_re = neg(p); out_im = neg(q); end
      2'd2: begin out_re = q;      out_im = neg(p); end
      2'd3: begin out_re = p;      out_im = neg(q); end
    endcase
  end
endmodule
