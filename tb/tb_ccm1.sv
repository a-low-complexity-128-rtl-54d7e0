// tb_ccm1: drives the enhanced CCM1 with the select words of the twiddle
// selection table (written out here, don't-cares as 0) for each of the seven
// factors 1, W8^1, -j, -jW8^1, W16^1, W16^3, -W16^1, with random inputs, and
// compares with the exact complex product (floating point, rounded, clipped).
// Tolerance TOL LSB covers the 10-bit coefficients and the shift truncation.
module tb_ccm1;
  import fft_pkg::*;
  localparam int W = 10, G = 8, TOL = 2;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ccm1_sel_t           sel;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;

  ccm1 #(.W(W), .G(G)) dut (.sel, .in_re, .in_im, .out_re, .out_im);

  // select table: sel1, sel2, sel3, sel4 per factor
  localparam logic [4:0] TAB [7] = '{
    {1'b0, 1'b0, 1'b0, 2'd0},   // 1
    {1'b0, 1'b1, 1'b1, 2'd0},   // W8^1
    {1'b0, 1'b0, 1'b0, 2'd2},   // -j
    {1'b0, 1'b1, 1'b1, 2'd2},   // -jW8^1
    {1'b0, 1'b0, 1'b1, 2'd0},   // W16^1
    {1'b1, 1'b0, 1'b1, 2'd3},   // W16^3
    {1'b0, 1'b0, 1'b1, 2'd1}};  // -W16^1
  // factor as a power of W16
  localparam int EXP16 [7] = '{0, 2, 4, 6, 1, 3, 9};

  function automatic int clipr(real v);
    int r = $rtoi($floor(v + 0.5));
    if (r > 511) return 511;
    if (r < -512) return -512;
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 7000; i++) begin
      int f, xr, xi, er, ei, dr, di;
      real c, s;
      f  = i % 7;
      xr = int'($urandom_range(1023)) - 512;
      xi = int'($urandom_range(1023)) - 512;
      if (i < 70) begin xr = (i % 2) ? 511 : -512; xi = (i % 3) ? -512 : 511; end
      @(posedge clk);
      sel = ccm1_sel_t'(TAB[f]); in_re = W'(xr); in_im = W'(xi);
      #1;
      c  = $cos(2.0 * PI * EXP16[f] / 16.0);
      s  = -$sin(2.0 * PI * EXP16[f] / 16.0);
      er = clipr(xr * c - xi * s);
      ei = clipr(xr * s + xi * c);
      dr = out_re - er; di = out_im - ei;
      checks++;
      if (dr > TOL || dr < -TOL || di > TOL || di < -TOL) begin
        failures++;
        if (failures < 10) $display("FAIL: factor %0d in (%0d,%0d) got (%0d,%0d) expected (%0d,%0d)",
                                    f, xr, xi, out_re, out_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
