// tb_tf4_rom: reads all 128 ROM words and compares them with cos and -sin of
// 2*pi*e/128 scaled by 2^(CW-2) = 512, to within 1 LSB; checks the exact
// values at e = 0, 32, 64.
module tb_tf4_rom;
  localparam int CW = 11;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0]           e;
  logic signed [CW-1:0] c, ms;

  tf4_rom #(.CW(CW)) dut (.e, .cos_o(c), .msin_o(ms));

  task automatic chk(string what, int got, int exp, int tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 10) $display("FAIL: %s e=%0d got %0d expected %0d", what, e, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 128; i++) begin
      @(posedge clk);
      e = 7'(i);
      #1;
      chk("cos", c, $rtoi($floor(512.0 * $cos(2.0 * PI * i / 128.0) + 0.5)), 1);
      chk("-sin", ms, $rtoi($floor(-512.0 * $sin(2.0 * PI * i / 128.0) + 0.5)), 1);
      if (i == 0)  begin chk("cos0", c, 512, 0);  chk("sin0", ms, 0, 0);    end
      if (i == 32) begin chk("cos32", c, 0, 0);   chk("sin32", ms, -512, 0); end
      if (i == 64) begin chk("cos64", c, -512, 0); chk("sin64", ms, 0, 0);  end
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
