// tb_delay_line: checks the feedback buffers of depth 16 and 1: with a
// random enable, the output must equal the word written DEPTH enabled
// cycles earlier (reference: a queue that moves only on enabled cycles).
module tb_delay_line;
  localparam int W = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en;
  logic signed [W-1:0] d_re, d_im, q16_re, q16_im, q1_re, q1_im;
  int hist_re [$], hist_im [$];
  int nwr = 0;

  delay_line #(.W(W), .DEPTH(16)) dut16 (.clk, .en, .in_re(d_re), .in_im(d_im), .out_re(q16_re), .out_im(q16_im));
  delay_line #(.W(W), .DEPTH(1))  dut1  (.clk, .en, .in_re(d_re), .in_im(d_im), .out_re(q1_re),  .out_im(q1_im));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    en = 1'b0; d_re = '0; d_im = '0;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      if (en) begin hist_re.push_front(int'(d_re)); hist_im.push_front(int'(d_im)); nwr++; end
      #1;
      if (nwr >= 16) begin
        chk("depth16 re", q16_re, hist_re[15]);
        chk("depth16 im", q16_im, hist_im[15]);
      end
      if (nwr >= 1) begin
        chk("depth1 re", q1_re, hist_re[0]);
        chk("depth1 im", q1_im, hist_im[0]);
      end
      if (hist_re.size() > 20) begin void'(hist_re.pop_back()); void'(hist_im.pop_back()); end
      en = ($urandom_range(3) != 0);
      d_re = W'($urandom); d_im = W'($urandom);
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
