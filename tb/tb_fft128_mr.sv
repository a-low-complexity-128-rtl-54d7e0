// tb_fft128_mr: end-to-end test of the 128-point FFT/IFFT processor at its
// default parameters. It feeds NSYM symbols and one flush symbol through the
// four input lanes and compares every result with a direct 128-point DFT
// computed here in floating point (scaled by 1/16, clipped to the word
// range), to within TOL LSB per component (TOL_DC for X(0): round-half-up in
// the four halving stages biases the DC bin by up to about +4 LSB); the rms
// error over all results must stay below RMS_TOL LSB. Symbol kinds:
//   random data, back to back            (rate: 32 result sets per 32 clocks)
//   random data with input stalls        (in_valid low at random)
//   random data in IFFT mode             (mode switch FFT <-> IFFT)
//   full-scale DC                        (butterfly saturation)
// Two flush symbols of random data follow, since the last result of a symbol
// needs 40 further input sets. It also checks the latency (40 enabled cycles from input set 0 to the
// last stage, result registered one clock later), that results leave in
// bit-reversed order (checked through the index mapping) and counts how
// often each mechanism occurred; one that never occurred is a failure.
module tb_fft128_mr;
  localparam int W    = 10;
  localparam int NSYM = 8;
  localparam int  TOL     = 6;
  localparam int  TOL_DC  = 8;
  localparam real RMS_TOL = 1.5;   // rms error per component, in LSB
  localparam int NALL = NSYM + 2;
  localparam real PI  = 3.14159265358979323846;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                in_valid, in_ifft;
  logic signed [W-1:0] in_re [4], in_im [4];
  logic                out_valid, out_sop, out_ifft;
  logic signed [W-1:0] out_re [4], out_im [4];

  fft128_mr dut (.*);

  always #5 clk = ~clk;

  int  xr [NALL][128], xi [NALL][128];
  int  kind [NALL];     // 0 random, 1 random+stalls, 2 IFFT, 3 DC full scale
  real er [NSYM][128], ei [NSYM][128];
  int  checks = 0, failures = 0;
  int  n_stall = 0, n_ifft = 0, n_switch = 0, n_sat = 0, n_sym_out = 0;
  int  max_err = 0, max_err_ac = 0;
  real sq_err = 0.0;
  int  n_err = 0;
  longint cyc = 0, nval = 0;
  longint sop_in_nval [NALL];
  longint sop_in_cyc [NALL];
  int     in_sym;
  bit     in_first;

  function automatic int bitrev7(int v);
    int r = 0;
    for (int b = 0; b < 7; b++) if (v[b]) r |= 1 << (6 - b);
    return r;
  endfunction

  function automatic real clip(real v);
    if (v > 511.0)  return 511.0;
    if (v < -512.0) return -512.0;
    return v;
  endfunction

  task automatic make_ref(int s);
    real sr, si, ang;
    bit inv = (kind[s] == 2);
    for (int k = 0; k < 128; k++) begin
      sr = 0.0; si = 0.0;
      for (int n = 0; n < 128; n++) begin
        ang = 2.0 * PI * real'((n * k) % 128) / 128.0;
        if (inv) ang = -ang;
        sr += xr[s][n] * $cos(ang) + xi[s][n] * $sin(ang);
        si += xi[s][n] * $cos(ang) - xr[s][n] * $sin(ang);
      end
      er[s][k] = clip(sr / 16.0);
      ei[s][k] = clip(si / 16.0);
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    for (int s = 0; s < NALL; s++) begin
      kind[s] = (s >= NSYM) ? 0 : (s % 4 == 3) ? 3 : (s % 4);
      for (int n = 0; n < 128; n++) begin
        if (kind[s] == 3) begin
          xr[s][n] = 511; xi[s][n] = -512;
        end else begin
          xr[s][n] = int'($urandom_range(255)) - 128;
          xi[s][n] = int'($urandom_range(255)) - 128;
        end
      end
      if (s < NSYM) make_ref(s);
    end
    rst_n = 1'b0; in_valid = 1'b0; in_ifft = 1'b0; in_first = 1'b0; in_sym = 0;
    for (int l = 0; l < 4; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < NALL; s++) begin
      for (int m = 0; m < 32; m++) begin
        if (kind[s] == 1) begin
          while ($urandom_range(2) == 0) begin
            in_valid <= 1'b0;
            for (int l = 0; l < 4; l++) begin in_re[l] <= W'($urandom); in_im[l] <= W'($urandom); end
            @(posedge clk);
            n_stall++;
          end
        end
        in_valid <= 1'b1;
        in_ifft  <= (kind[s] == 2);
        for (int l = 0; l < 4; l++) begin
          in_re[l] <= W'(xr[s][4*m+l]);
          in_im[l] <= W'(xi[s][4*m+l]);
        end
        in_sym   <= s;
        in_first <= (m == 0);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    if (n_sym_out != NSYM) begin
      failures++;
      $display("FAIL: %0d of %0d symbols came out", n_sym_out, NSYM);
    end
    if (n_stall == 0)  begin failures++; $display("FAIL: no stall happened"); end
    if (n_ifft == 0)   begin failures++; $display("FAIL: no IFFT symbol"); end
    if (n_switch == 0) begin failures++; $display("FAIL: no FFT/IFFT mode switch"); end
    if (n_sat == 0)    begin failures++; $display("FAIL: no saturated result"); end
    checks++;
    if ($sqrt(sq_err / n_err) > RMS_TOL) begin
      failures++;
      $display("FAIL: rms error %0.2f LSB", $sqrt(sq_err / n_err));
    end
    $display("rms error %0.2f LSB", $sqrt(sq_err / n_err));
    $display("stalls=%0d ifft_sets=%0d mode_switches=%0d saturated=%0d max_err=%0d (%0d outside X(0))",
             n_stall, n_ifft, n_switch, n_sat, max_err, max_err_ac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- cycle counters ----------------
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      nval <= nval + 1;
      if (in_first) begin sop_in_nval[in_sym] <= nval; sop_in_cyc[in_sym] <= cyc; end
    end
  end

  // ---------------- output checker ----------------
  int  osym = 0, opos = 0;
  bit  prev_mode = 1'b0;
  always @(posedge clk) begin
    if (rst_n && out_valid && osym < NSYM) begin
      // framing and latency
      checks++;
      if (out_sop != (opos == 0)) begin
        failures++;
        $display("FAIL: out_sop=%0b at symbol %0d set %0d", out_sop, osym, opos);
      end
      if (opos == 0) begin
        checks++;
        // nval counts valid edges before this one; the result of input set 0
        // is registered on the edge after LAT=40 further valid sets.
        if (nval - sop_in_nval[osym] != 41) begin  // sop_in_nval: valid edges before set 0
          failures++;
          $display("FAIL: latency %0d enabled cycles for symbol %0d", nval - sop_in_nval[osym] - 1, osym);
        end
        if (kind[osym] == 0 && osym > 0 && kind[osym-1] == 0) begin
          checks++;  // back-to-back symbols: results every clock, 41 clocks after input
          if (cyc - sop_in_cyc[osym] != 41) begin
            failures++;
            $display("FAIL: %0d clocks from input to output for symbol %0d", cyc - sop_in_cyc[osym], osym);
          end
        end
        if (osym > 0 && out_ifft != prev_mode) n_switch++;
        prev_mode = out_ifft;
      end
      checks++;
      if (out_ifft != (kind[osym] == 2)) begin
        failures++;
        $display("FAIL: out_ifft=%0b for symbol %0d", out_ifft, osym);
      end
      if (out_ifft) n_ifft++;
      for (int q = 0; q < 4; q++) begin
        int  k;
        int  dre, dim;
        k   = bitrev7(4 * opos + q);
        dre = int'(out_re[q]) - int'($rtoi($floor(er[osym][k] + 0.5)));
        dim = int'(out_im[q]) - int'($rtoi($floor(ei[osym][k] + 0.5)));
        sq_err += real'(dre * dre + dim * dim);
        n_err  += 2;
        if (dre < 0) dre = -dre;
        if (dim < 0) dim = -dim;
        if (dre > max_err) max_err = dre;
        if (dim > max_err) max_err = dim;
        if (k != 0 && dre > max_err_ac) max_err_ac = dre;
        if (k != 0 && dim > max_err_ac) max_err_ac = dim;
        if (out_re[q] == 10'sd511 || out_re[q] == -10'sd512 ||
            out_im[q] == 10'sd511 || out_im[q] == -10'sd512) n_sat++;
        checks++;
        if (dre > ((k == 0) ? TOL_DC : TOL) || dim > ((k == 0) ? TOL_DC : TOL)) begin
          failures++;
          if (failures < 20)
            $display("FAIL: symbol %0d X(%0d) = (%0d,%0d), expected (%0.2f,%0.2f)",
                     osym, k, out_re[q], out_im[q], er[osym][k], ei[osym][k]);
        end
      end
      if (opos == 31) begin opos = 0; osym++; n_sym_out++; end
      else opos++;
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
