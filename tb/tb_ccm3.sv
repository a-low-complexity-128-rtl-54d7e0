// tb_ccm3: checks CCM3, which multiplies by -j*W8^ks, for ks = 0 and 1 with
// random and full-scale inputs against the exact complex product (floating
// point, rounded, clipped to 10 bits), to within TOL LSB.
module tb_ccm3;
  localparam int W = 10, G = 8, TOL = 2;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                sel;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;

  ccm3 #(.W(W), .G(G)) dut (.sel, .in_re, .in_im, .out_re, .out_im);

  function automatic int clipr(real v);
    int r = $rtoi($floor(v + 0.5));
    if (r > 511) return 511;
    if (r < -512) return -512;
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int xr, xi, er, ei, dr, di, e8;
      real c, s;
      xr = int'($urandom_range(1023)) - 512;
      xi = int'($urandom_range(1023)) - 512;
      if (i < 40) begin xr = (i % 2) ? 511 : -512; xi = (i % 3) ? -512 : 511; end
      @(posedge clk);
      sel = i[0]; in_re = W'(xr); in_im = W'(xi);
      #1;
      e8 = int'(sel) + 2;     // factor W8^e8
      c  = $cos(2.0 * PI * e8 / 8.0);
      s  = -$sin(2.0 * PI * e8 / 8.0);
      er = clipr(xr * c - xi * s);
      ei = clipr(xr * s + xi * c);
      dr = out_re - er; di = out_im - ei;
      checks++;
      if (dr > TOL || dr < -TOL || di > TOL || di < -TOL) begin
        failures++;
        if (failures < 10) $display("FAIL: ks=%0d in (%0d,%0d) got (%0d,%0d) expected (%0d,%0d)",
                                    sel, xr, xi, out_re, out_im, er, ei);
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
