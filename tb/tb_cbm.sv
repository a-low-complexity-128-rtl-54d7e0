// tb_cbm: checks the complex Booth multiplier for every twiddle exponent
// e = 0..127 with random and full-scale inputs against the exact product
// with W128^e (floating point, rounded, clipped to 10 bits), within TOL LSB.
module tb_cbm;
  localparam int W = 10, CW = 11, TOL = 2;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0]          e;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;

  cbm #(.W(W), .CW(CW)) dut (.e, .in_re, .in_im, .out_re, .out_im);

  function automatic int clipr(real v);
    int r = $rtoi($floor(v + 0.5));
    if (r > 511) return 511;
    if (r < -512) return -512;
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 128 * 20; i++) begin
      int xr, xi, er, ei, dr, di;
      real c, s;
      xr = int'($urandom_range(1023)) - 512;
      xi = int'($urandom_range(1023)) - 512;
      if (i < 256) begin xr = (i % 2) ? 511 : -512; xi = (i % 4 < 2) ? -512 : 511; end
      @(posedge clk);
      e = 7'(i); in_re = W'(xr); in_im = W'(xi);
      #1;
      c  = $cos(2.0 * PI * (i % 128) / 128.0);
      s  = -$sin(2.0 * PI * (i % 128) / 128.0);
      er = clipr(xr * c - xi * s);
      ei = clipr(xr * s + xi * c);
      dr = out_re - er; di = out_im - ei;
      checks++;
      if (dr > TOL || dr < -TOL || di > TOL || di < -TOL) begin
        failures++;
        if (failures < 10) $display("FAIL: e=%0d in (%0d,%0d) got (%0d,%0d) expected (%0d,%0d)",
                                    e, xr, xi, out_re, out_im, er, ei);
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
