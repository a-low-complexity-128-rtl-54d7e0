// tb_fft_lane: checks the four data paths (stages 1-5), each driven by the
// controller, with random symbols and random input stalls. Path p receives
// x(4m+p). At output position t = 16k1 + 8k2 + 4k3 + 2k4 + k5 the expected
// value, worked out here in floating point from the decomposition, is
//   (1/8) (-j)^(n6 k5) sum_{n5} (-1)^(n5 k5) W128^((4n5+p)k')
//         sum_{a=0..15} x(4(2a+n5)+p) W16^(a k'),   k' = k1+2k2+4k3+8k4,
// with n6 = p/2 and 1/8 from the three halving stages (1, 3, 5). Results must
// match within TOL LSB and appear 38 enabled cycles after their input set.
module tb_fft_lane;
  import fft_pkg::*;
  localparam int W = 10, NSYM = 6, TOL = 4;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, stalls = 0;

  logic                rst_n, en;
  lane_ctrl_t          lc;
  logic [6:0]          tf4_e [4];
  logic                ks, out_ok;
  logic [4:0]          out_pos;
  logic signed [W-1:0] in_re [4], in_im [4], out_re [4], out_im [4];

  fft_ctrl u_ctrl (.clk, .rst_n, .en, .lc, .tf4_e, .s6_ks(ks), .out_ok, .out_pos);
  for (genvar p = 0; p < 4; p++) begin : g_dut
    fft_lane #(.LANE(p)) dut (.clk, .en, .lc, .tf4_e(tf4_e[p]),
      .in_re(in_re[p]), .in_im(in_im[p]), .out_re(out_re[p]), .out_im(out_im[p]));
  end

  int  xr [NSYM+2][128], xi [NSYM+2][128];
  real er [NSYM][4][32], ei [NSYM][4][32];
  longint nv = 0;

  task automatic make_ref(int s);
    for (int p = 0; p < 4; p++)
      for (int t = 0; t < 32; t++) begin
        int  k5, kp, n6;
        real sr, si, ir, ii, ang, tr, ti;
        k5 = t & 1;
        kp = ((t >> 4) & 1) + 2 * ((t >> 3) & 1) + 4 * ((t >> 2) & 1) + 8 * ((t >> 1) & 1);
        n6 = p / 2;
        sr = 0.0; si = 0.0;
        for (int n5 = 0; n5 < 2; n5++) begin
          ir = 0.0; ii = 0.0;
          for (int a = 0; a < 16; a++) begin
            int n = 4 * (2 * a + n5) + p;
            ang = 2.0 * PI * real'((a * kp) % 16) / 16.0;
            ir += xr[s][n] * $cos(ang) + xi[s][n] * $sin(ang);
            ii += xi[s][n] * $cos(ang) - xr[s][n] * $sin(ang);
          end
          ang = 2.0 * PI * real'(((4 * n5 + p) * kp) % 128) / 128.0;
          tr = ir * $cos(ang) + ii * $sin(ang);
          ti = ii * $cos(ang) - ir * $sin(ang);
          if (n5 == 1 && k5 == 1) begin tr = -tr; ti = -ti; end
          sr += tr; si += ti;
        end
        if (n6 == 1 && k5 == 1) begin tr = si; ti = -sr; sr = tr; si = ti; end
        er[s][p][t] = sr / 8.0;
        ei[s][p][t] = si / 8.0;
      end
  endtask

  initial begin
    for (int s = 0; s < NSYM + 2; s++) begin
      for (int n = 0; n < 128; n++) begin
        xr[s][n] = int'($urandom_range(255)) - 128;
        xi[s][n] = int'($urandom_range(255)) - 128;
      end
      if (s < NSYM) make_ref(s);
    end
    rst_n = 1'b0; en = 1'b0;
    for (int l = 0; l < 4; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < NSYM + 2; s++)
      for (int m = 0; m < 32; m++) begin
        while (s % 2 == 1 && $urandom_range(3) == 0) begin
          en <= 1'b0; stalls++;
          @(posedge clk);
        end
        en <= 1'b1;
        for (int l = 0; l < 4; l++) begin
          in_re[l] <= W'(xr[s][4 * m + l]);
          in_im[l] <= W'(xi[s][4 * m + l]);
        end
        @(posedge clk);
      end
    en <= 1'b0;
    @(posedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The path output register holds position nv-38 while nv enabled cycles
  // have passed; sample once per enabled cycle.
  always @(posedge clk) begin
    if (rst_n && en) begin
      if (nv >= 38 && (nv - 38) / 32 < NSYM) begin
        int s, t;
        s = int'((nv - 38) / 32);
        t = int'((nv - 38) % 32);
        for (int p = 0; p < 4; p++) begin
          real dr, di;
          dr = out_re[p] - er[s][p][t];
          di = out_im[p] - ei[s][p][t];
          checks++;
          if (dr > TOL || dr < -TOL || di > TOL || di < -TOL) begin
            failures++;
            if (failures < 10) $display("FAIL: sym %0d path %0d pos %0d got (%0d,%0d) expected (%0.2f,%0.2f)",
                                        s, p, t, out_re[p], out_im[p], er[s][p][t], ei[s][p][t]);
          end
        end
      end
      nv <= nv + 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
