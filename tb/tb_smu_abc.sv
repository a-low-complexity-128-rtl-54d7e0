// tb_smu_abc: checks the shift-and-add unit against exact products with the
// 10-bit coefficients a = 473/512, b = 195/512, c = 362/512 for every 10-bit
// input. The outputs carry G = 8 fractional bits, so the exact value is
// y * coef / 2; the shifts truncate, which may lose up to TOL LSB of the fraction.
module tb_smu_abc;
  localparam int W = 10, G = 8, TOL = 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, maxe = 0;

  logic signed [W-1:0]   y;
  logic signed [W+G-1:0] ay, by, cy;

  smu_abc #(.W(W), .G(G)) dut (.y, .ay, .by, .cy);

  task automatic chk(string what, int got, int num);   // exact value num/2
    int e;
    checks++;
    e = 2 * got - num; if (e < 0) e = -e;
    if (e > maxe) maxe = e;
    if (e > 2 * TOL) begin
      failures++;
      if (failures < 10) $display("FAIL: %s y=%0d got %0d expected %0d/2", what, y, got, num);
    end
  endtask

  initial begin
    for (int v = -512; v < 512; v++) begin
      @(posedge clk);
      y = W'(v);
      #1;
      chk("ay", ay, v * 473);
      chk("by", by, v * 195);
      chk("cy", cy, v * 362);
    end
    $display("max error %0d/2 LSB", maxe);
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
