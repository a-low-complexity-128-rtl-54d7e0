// tb_fft_ctrl: runs the controller with a random enable and compares every
// control output with values worked out here from an independent count of
// enabled cycles c: the butterfly selects are bit b of (c - latency) mod 32,
// the stage-2 selects come from the twiddle exponent (k1+2k2)(2n3+n4) and
// the twiddle selection table (written out here), the stage-4 exponents are
// (4 n5 + lane) * k' mod 128, and out_ok rises after 40 enabled cycles.
module tb_fft_ctrl;
  import fft_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst_n, en;
  lane_ctrl_t lc;
  logic [6:0] tf4_e [4];
  logic       s6_ks, out_ok;
  logic [4:0] out_pos;

  fft_ctrl dut (.clk, .rst_n, .en, .lc, .tf4_e, .s6_ks, .out_ok, .out_pos);

  int c = 0;   // enabled cycles since reset

  function automatic int bitof(int d, int b);
    return (((c - d) % 32 + 32) % 32 >> b) & 1;
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at c=%0d got %0d expected %0d", what, c, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int kk, nn, prod, sel, kp, pos;
      @(posedge clk);
      if (rst_n && en) c++;
      en <= ($urandom_range(4) != 0);
      #1;
      chk("s1_sel", lc.s1_sel, bitof(0, 4));
      chk("s1_mj", lc.s1_mj, bitof(16, 4) & bitof(16, 3));
      chk("s2_sel", lc.s2_sel, bitof(17, 3));
      kk = bitof(26, 4) + 2 * bitof(26, 3);
      nn = 2 * bitof(26, 2) + bitof(26, 1);
      prod = kk * nn;
      case (prod)   // sel1 sel2 sel3 sel4 of the selection table
        0: sel = 5'b00000;  2: sel = 5'b01100;  4: sel = 5'b00010;  6: sel = 5'b01110;
        1: sel = 5'b00100;  3: sel = 5'b10111;  9: sel = 5'b00101;  default: sel = -1;
      endcase
      chk("s2_ccm", int'(lc.s2_ccm), sel);
      chk("s3_sel", lc.s3_sel, bitof(27, 2));
      chk("s3_mj", lc.s3_mj, bitof(31, 2) & bitof(31, 1));
      chk("s4_sel", lc.s4_sel, bitof(32, 1));
      kp = bitof(35, 4) + 2 * bitof(35, 3) + 4 * bitof(35, 2) + 8 * bitof(35, 1);
      for (int l = 0; l < 4; l++) chk("tf4_e", tf4_e[l], ((4 * bitof(35, 0) + l) * kp) % 128);
      chk("s5_sel", lc.s5_sel, bitof(36, 0));
      chk("s5_mj", lc.s5_mj, bitof(37, 0));
      chk("s6_ks", s6_ks, bitof(39, 0));
      pos = ((c - 40) % 32 + 32) % 32;
      chk("out_pos", out_pos, pos);
      chk("out_ok", out_ok, c >= 40);
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
