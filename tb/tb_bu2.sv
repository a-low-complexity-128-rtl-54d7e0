// tb_bu2: checks the type-II butterfly (type-I butterfly plus -j unit)
// against a behavioural model for all four combinations of sel1 and sel2:
// the output to the next stage is multiplied by -j, i.e. (re, im) becomes
// (im, -re), with -(-512) saturated to 511. Both SCALE settings.
module tb_bu2;
  localparam int W = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sel1, sel2;
  logic signed [W-1:0] a_re, a_im, b_re, b_im;
  logic signed [W-1:0] o1r [2], o1i [2], o2r [2], o2i [2];

  bu2 #(.W(W), .SCALE(1'b0)) dut0 (.sel1, .sel2, .in1_re(a_re), .in1_im(a_im), .in2_re(b_re), .in2_im(b_im),
    .out1_re(o1r[0]), .out1_im(o1i[0]), .out2_re(o2r[0]), .out2_im(o2i[0]));
  bu2 #(.W(W), .SCALE(1'b1)) dut1 (.sel1, .sel2, .in1_re(a_re), .in1_im(a_im), .in2_re(b_re), .in2_im(b_im),
    .out1_re(o1r[1]), .out1_im(o1i[1]), .out2_re(o2r[1]), .out2_im(o2i[1]));

  function automatic int fit(int v, int sc);
    if (sc) v = (v >= 0) ? (v + 1) / 2 : -((-v) / 2);   // floor((v+1)/2)
    if (v > 511) return 511;
    if (v < -512) return -512;
    return v;
  endfunction

  function automatic int negs(int v);
    return (v == -512) ? 511 : -v;
  endfunction

  function automatic int rnd();
    case ($urandom_range(3))
      0: return 511;
      1: return -512;
      default: return int'($urandom_range(1023)) - 512;
    endcase
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int ar, ai, br, bi, pr, pi;
      ar = rnd(); ai = rnd(); br = rnd(); bi = rnd();
      @(posedge clk);
      sel1 = i[0]; sel2 = i[1]; a_re = W'(ar); a_im = W'(ai); b_re = W'(br); b_im = W'(bi);
      #1;
      for (int sc = 0; sc < 2; sc++) begin
        pr = sel1 ? fit(ar + br, sc) : ar;
        pi = sel1 ? fit(ai + bi, sc) : ai;
        chk("out1_re", o1r[sc], sel2 ? pi : pr);
        chk("out1_im", o1i[sc], sel2 ? negs(pr) : pi);
        chk("out2_re", o2r[sc], sel1 ? fit(ar - br, sc) : br);
        chk("out2_im", o2i[sc], sel1 ? fit(ai - bi, sc) : bi);
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
