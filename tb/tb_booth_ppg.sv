// tb_booth_ppg: a Booth encoder feeding a partial-product generator must
// give the exact product x * coef. Every 11-bit coefficient is tried with
// random and extreme 10-bit multiplicands.
module tb_booth_ppg;
  import fft_pkg::*;
  localparam int W = 10, CW = 11, ND = (CW + 1) / 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [CW-1:0]   coef;
  logic signed [W-1:0]    x;
  booth_dig_t             dig [ND];
  logic signed [W+CW-1:0] prod;

  booth_enc #(.CW(CW)) u_enc (.coef, .dig);
  booth_ppg #(.W(W), .CW(CW)) dut (.x, .dig, .prod);

  initial begin
    for (int c = -1024; c < 1024; c++) begin
      for (int j = 0; j < 4; j++) begin
        int xv;
        xv = (j == 0) ? -512 : (j == 1) ? 511 : int'($urandom_range(1023)) - 512;
        @(posedge clk);
        coef = CW'(c); x = W'(xv);
        #1;
        checks++;
        if (prod != c * xv) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d * %0d gave %0d", xv, c, prod);
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
