// wl_run: testbench helper that drives one fft128_mr instance of word
// length W with NSYM random symbols (plus flush symbols) of amplitude
// +-2^(W-3) per component, compares each result with a floating-point DFT
// scaled by 1/16 and accumulates signal and error power. When the last
// symbol has been checked it raises done and leaves the signal-to-
// quantization-noise ratio in sqnr_db.
module wl_run #(
  parameter int W    = 10,
  parameter int NSYM = 4
) (
  input  logic clk,
  output logic done,
  output real  sqnr_db,
  output int   nres
);
  localparam real PI   = 3.14159265358979323846;
  localparam int  NALL = NSYM + 2;
  localparam int  AMP  = 1 << (W - 3);

  logic                rst_n, in_valid, in_ifft, out_valid, out_sop, out_ifft;
  logic signed [W-1:0] in_re [4], in_im [4], out_re [4], out_im [4];

  fft128_mr #(.W(W)) dut (.clk, .rst_n, .in_valid, .in_ifft, .in_re, .in_im,
    .out_valid, .out_sop, .out_ifft, .out_re, .out_im);

  int  xr [NALL][128], xi [NALL][128];
  real er [NSYM][128], ei [NSYM][128];
  real psig = 0.0, perr = 0.0;
  int  osym = 0, opos = 0;

  function automatic int bitrev7(int v);
    int r = 0;
    for (int b = 0; b < 7; b++) if (v[b]) r |= 1 << (6 - b);
    return r;
  endfunction

  initial begin
    done = 1'b0; sqnr_db = 0.0; nres = 0;
    for (int s = 0; s < NALL; s++)
      for (int n = 0; n < 128; n++) begin
        xr[s][n] = int'($urandom_range(2 * AMP - 1)) - AMP;
        xi[s][n] = int'($urandom_range(2 * AMP - 1)) - AMP;
      end
    for (int s = 0; s < NSYM; s++)
      for (int k = 0; k < 128; k++) begin
        real sr, si, ang;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < 128; n++) begin
          ang = 2.0 * PI * real'((n * k) % 128) / 128.0;
          sr += xr[s][n] * $cos(ang) + xi[s][n] * $sin(ang);
          si += xi[s][n] * $cos(ang) - xr[s][n] * $sin(ang);
        end
        er[s][k] = sr / 16.0;
        ei[s][k] = si / 16.0;
      end
    rst_n = 1'b0; in_valid = 1'b0; in_ifft = 1'b0;
    for (int l = 0; l < 4; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < NALL; s++)
      for (int m = 0; m < 32; m++) begin
        in_valid <= 1'b1;
        for (int l = 0; l < 4; l++) begin
          in_re[l] <= W'(xr[s][4 * m + l]);
          in_im[l] <= W'(xi[s][4 * m + l]);
        end
        @(posedge clk);
      end
    in_valid <= 1'b0;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && osym < NSYM) begin
      for (int q = 0; q < 4; q++) begin
        int  k;
        real dr, di;
        k = bitrev7(4 * opos + q);
        psig += er[osym][k] * er[osym][k] + ei[osym][k] * ei[osym][k];
        dr = real'(out_re[q]) - er[osym][k];
        di = real'(out_im[q]) - ei[osym][k];
        perr += dr * dr + di * di;
        nres++;
      end
      if (opos == 31) begin
        opos = 0;
        osym++;
        if (osym == NSYM) begin
          sqnr_db = 10.0 * $log10(psig / perr);
          done = 1'b1;
        end
      end else opos++;
    end
  end
endmodule
