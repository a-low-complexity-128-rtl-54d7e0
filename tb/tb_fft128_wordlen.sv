// tb_fft128_wordlen: runs the processor with internal word lengths of 8, 10
// and 12 bits (the three implementation points of the published design) on
// random symbols and reports the signal-to-quantization-noise ratio of each
// (published figures for the three points: about 24, 35 and 47 dB). Checks: every result set arrives, each SQNR is at least MIN_DB[i], and
// each two extra bits gain at least 8 dB.
module tb_fft128_wordlen;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int  WLS [3]    = '{8, 10, 12};
  localparam real MIN_DB [3] = '{22.0, 33.0, 44.5};

  logic done [3];
  real  sqnr [3];
  int   nres [3];

  wl_run #(.W(8))  u_w8  (.clk, .done(done[0]), .sqnr_db(sqnr[0]), .nres(nres[0]));
  wl_run #(.W(10)) u_w10 (.clk, .done(done[1]), .sqnr_db(sqnr[1]), .nres(nres[1]));
  wl_run #(.W(12)) u_w12 (.clk, .done(done[2]), .sqnr_db(sqnr[2]), .nres(nres[2]));

  initial begin
    wait (done[0] && done[1] && done[2]);
    for (int i = 0; i < 3; i++) begin
      $display("word length %0d bits: SQNR %0.1f dB over %0d results", WLS[i], sqnr[i], nres[i]);
      checks++;
      if (nres[i] != 4 * 128) begin failures++; $display("FAIL: %0d results", nres[i]); end
      checks++;
      if (sqnr[i] < MIN_DB[i]) begin failures++; $display("FAIL: SQNR below %0.1f dB", MIN_DB[i]); end
      if (i > 0) begin
        checks++;
        if (sqnr[i] - sqnr[i-1] < 8.0) begin failures++; $display("FAIL: too little gain from 2 more bits"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
