// tb_smu_c: checks the three-adder cos(pi/4) unit against the exact product
// with the 10-bit coefficient 362/512 for every 10-bit input (G = 8
// fractional bits at the output, so the exact value is z * 362 / 2).
module tb_smu_c;
  localparam int W = 10, G = 8, TOL = 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, maxe = 0;

  logic signed [W-1:0]   z;
  logic signed [W+G-1:0] cz;

  smu_c #(.W(W), .G(G)) dut (.z, .cz);

  initial begin
    for (int v = -512; v < 512; v++) begin
      int e;
      @(posedge clk);
      z = W'(v);
      #1;
      checks++;
      e = 2 * cz - v * 362; if (e < 0) e = -e;
      if (e > maxe) maxe = e;
      if (e > 2 * TOL) begin
        failures++;
        if (failures < 10) $display("FAIL: z=%0d got %0d expected %0d/2", v, cz, v * 362);
      end
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
