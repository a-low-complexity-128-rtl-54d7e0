// cbm: complex Booth multiplier of stage 4. It multiplies the complex input
// by the twiddle factor W128^e read from tf4_rom:
//   Re = xr*cos - xi*(-sin),  Im = xr*(-sin) + xi*cos.
// Two Booth encoders (one per coefficient), four partial-product generators
// (one per real product) and two adders, as the published CBM is composed,
// followed by rounding of the CW-2 fractional bits and saturation to W bits
// (own choice). The exponent e = n5*(k1+2k2+4k3+8k4) mod 128 comes from the
// controller. Combinational between the stage-4 pipeline registers.
module cbm
  import fft_pkg::*;
#(
  parameter int W  = 10,
  parameter int CW = 11
) (
  input  logic [6:0]          e,
  input  logic signed [W-1:0] in_re, in_im,
  output logic signed [W-1:0] out_re, out_im
);
  localparam int ND = (CW + 1) / 2;
  localparam int PW = W + CW;

  logic signed [CW-1:0] c_cos, c_msin;
  booth_dig_t           d_cos [ND];
  booth_dig_t           d_msin [ND];
  logic signed [PW-1:0] p_rc, p_is, p_rs, p_ic;
  logic signed [PW:0]   s_re, s_im;

  tf4_rom #(.CW(CW)) u_rom (.e(e), .cos_o(c_cos), .msin_o(c_msin));

  booth_enc #(.CW(CW)) u_enc_c (.coef(c_cos),  .dig(d_cos));
  booth_enc #(.CW(CW)) u_enc_s (.coef(c_msin), .dig(d_msin));

  booth_ppg #(.W(W), .CW(CW)) u_pp_rc (.x(in_re), .dig(d_cos),  .prod(p_rc));
  booth_ppg #(.W(W), .CW(CW)) u_pp_is (.x(in_im), .dig(d_msin), .prod(p_is));
  booth_ppg #(.W(W), .CW(CW)) u_pp_rs (.x(in_re), .dig(d_msin), .prod(p_rs));
  booth_ppg #(.W(W), .CW(CW)) u_pp_ic (.x(in_im), .dig(d_cos),  .prod(p_ic));

  assign s_re = (PW+1)'(p_rc) - (PW+1)'(p_is);
  assign s_im = (PW+1)'(p_rs) + (PW+1)'(p_ic);

  rnd_sat #(.IW(PW+1), .G(CW-2), .W(W)) u_r_re (.in(s_re), .out(out_re));
  rnd_sat #(.IW(PW+1), .G(CW-2), .W(W)) u_r_im (.in(s_im), .out(out_im));
endmodule
