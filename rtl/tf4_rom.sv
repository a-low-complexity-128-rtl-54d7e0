// tf4_rom: twiddle-factor ROM of the stage-4 complex Booth multipliers.
// For address e it returns W128^e = cos(2*pi*e/128) - j*sin(2*pi*e/128) as
// two CW-bit coefficients with CW-2 fractional bits (so +-1.0 is exact):
//   cos_o = round(cos(2*pi*e/128) * 2^(CW-2)),  msin_o = round(-sin(...) * 2^(CW-2)).
// The 128-entry table is computed at elaboration from that formula.
// Combinational read.
module tf4_rom #(
  parameter int CW = 11
) (
  input  logic [6:0]           e,
  output logic signed [CW-1:0] cos_o,
  output logic signed [CW-1:0] msin_o
);
  typedef logic signed [CW-1:0] tab_t [128];
  localparam real PI = 3.14159265358979323846;

  function automatic tab_t mk_tab(bit sine);
    tab_t t;
    real  v;
    for (int i = 0; i < 128; i++) begin
      v = sine ? -$sin(2.0 * PI * i / 128.0) : $cos(2.0 * PI * i / 128.0);
      t[i] = CW'($rtoi($floor(v * real'(1 << (CW - 2)) + 0.5)));
    end
    return t;
  endfunction

  localparam tab_t COS_T  = mk_tab(1'b0);
  localparam tab_t MSIN_T = mk_tab(1'b1);

  assign cos_o  = COS_T[e];
  assign msin_o = MSIN_T[e];
endmodule
