// tb_fft_tail: checks stages 6 and 7. Random words enter the four inputs and
// are held for three enabled clocks together with ks; the outputs are then
// compared with a floating-point model: stage 6 sums/differences of inputs
// 0,2 and 1,3 (not halved), W8^ks on the 1+3 sum, -jW8^ks on the 1-3
// difference, then halved stage-7 sums/differences (default scaling),
// within TOL LSB. A held enable must freeze the outputs.
module tb_fft_tail;
  localparam int W = 10, TOL = 2;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                en, ks;
  logic signed [W-1:0] in_re [4], in_im [4], out_re [4], out_im [4];

  fft_tail dut (.clk, .en, .ks, .in_re, .in_im, .out_re, .out_im);

  function automatic real clipv(real v);
    if (v > 511.0) return 511.0;
    if (v < -512.0) return -512.0;
    return v;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    en = 1'b1; ks = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      real ang, yr [4], yi [4], ar [2], ai [2], br [2], bi [2], tr, ti, c, s, er [4], ei [4];
      int  hold_re [4], hold_im [4];
      @(posedge clk);
      ks <= i[0];
      for (int l = 0; l < 4; l++) begin
        yr[l] = int'($urandom_range(255)) - 128;
        yi[l] = int'($urandom_range(255)) - 128;
        in_re[l] <= W'(int'(yr[l]));
        in_im[l] <= W'(int'(yi[l]));
      end
      en <= 1'b1;
      repeat (3) @(posedge clk);
      #1;
      ar[0] = clipv(yr[0] + yr[2]); ai[0] = clipv(yi[0] + yi[2]);
      ar[1] = clipv(yr[0] - yr[2]); ai[1] = clipv(yi[0] - yi[2]);
      br[0] = clipv(yr[1] + yr[3]); bi[0] = clipv(yi[1] + yi[3]);
      br[1] = clipv(yr[1] - yr[3]); bi[1] = clipv(yi[1] - yi[3]);
      ang = ks ? PI / 4.0 : 0.0;
      c = $cos(ang); s = -$sin(ang);
      tr = br[0] * c - bi[0] * s; ti = br[0] * s + bi[0] * c; br[0] = tr; bi[0] = ti;
      tr = br[1] * c - bi[1] * s; ti = br[1] * s + bi[1] * c;
      br[1] = ti; bi[1] = -tr;                      // times -j
      er[0] = (ar[0] + br[0]) / 2.0; ei[0] = (ai[0] + bi[0]) / 2.0;
      er[1] = (ar[0] - br[0]) / 2.0; ei[1] = (ai[0] - bi[0]) / 2.0;
      er[2] = (ar[1] + br[1]) / 2.0; ei[2] = (ai[1] + bi[1]) / 2.0;
      er[3] = (ar[1] - br[1]) / 2.0; ei[3] = (ai[1] - bi[1]) / 2.0;
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (absr(out_re[q] - er[q]) > TOL || absr(out_im[q] - ei[q]) > TOL) begin
          failures++;
          if (failures < 10) $display("FAIL: ks=%0d out%0d (%0d,%0d) expected (%0.1f,%0.1f)",
                                      ks, q, out_re[q], out_im[q], er[q], ei[q]);
        end
        hold_re[q] = out_re[q]; hold_im[q] = out_im[q];
      end
      // freeze: new inputs with en low must not change the outputs
      en <= 1'b0;
      for (int l = 0; l < 4; l++) begin in_re[l] <= W'($urandom); in_im[l] <= W'($urandom); end
      repeat (2) @(posedge clk);
      #1;
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (out_re[q] != hold_re[q] || out_im[q] != hold_im[q]) begin
          failures++;
          if (failures < 10) $display("FAIL: output %0d changed with en low", q);
        end
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
