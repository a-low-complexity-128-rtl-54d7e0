// fft_ctrl: control unit of the 128-point FFT. A 5-bit counter counts the
// enabled cycles (one per set of four input samples, 32 per symbol); every
// control signal is a function of the stream position that the addressed
// stage sees, which is the counter minus that stage's latency (in enabled
// cycles) modulo 32:
//   stage 1 butterfly  pos = cnt        sel = pos[4]
//   stage 1 -j         pos = cnt-16     pos[4] & pos[3]           (k1 & n2)
//   stage 2 butterfly  pos = cnt-17     sel = pos[3]
//   stage 2 twiddle    pos = cnt-26     W16^((k1+2k2)(2n3+n4)), k1=pos[4],
//                                       k2=pos[3], n3=pos[2], n4=pos[1]
//   stage 3 butterfly  pos = cnt-27     sel = pos[2]
//   stage 3 -j         pos = cnt-31     pos[2] & pos[1]           (k3 & n4)
//   stage 4 butterfly  pos = cnt-32     sel = pos[1]
//   stage 4 twiddle    pos = cnt-35     e = (4*pos[0] + lane) * k',
//                                       k' = pos[4] + 2pos[3] + 4pos[2] + 8pos[1]
//   stage 5 butterfly  pos = cnt-36     sel = pos[0]
//   stage 5 -j         pos = cnt-37     pos[0]                    (k5, paths 2, 3)
//   stage 6 twiddle    pos = cnt-39     ks = pos[0]               (k5)
//   output             pos = cnt-40
// The counter and the fill counter reset synchronously (rst_n low); the
// first enabled cycle after reset carries input sample 0 of a symbol.
// out_ok is high while the output position belongs to a symbol that was fed
// completely (at least LAT enabled cycles since reset); out_pos is the output
// position. The latencies follow the pipeline registers of the block
// diagram; the counter itself is an own choice (the published design gives only the
// select table, not how the selects are produced).
module fft_ctrl
  import fft_pkg::*;
#(
  parameter int LAT = 40    // enabled cycles from input to stage-7 result
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output lane_ctrl_t  lc,
  output logic [6:0]  tf4_e [LANES],
  output logic        s6_ks,
  output logic        out_ok,
  output logic [4:0]  out_pos
);
  logic [4:0] cnt;
  logic [5:0] fill;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      fill <= '0;
    end else if (en) begin
      cnt <= cnt + 5'd1;
      if (fill != 6'(LAT)) fill <= fill + 6'd1;
    end
  end

  function automatic logic [4:0] pos(int d);
    return cnt - 5'(d);
  endfunction

  logic [4:0] p1m, p2, p2t, p3, p3m, p4, p4t, p5, p5m, p6;
  logic [3:0] kp;

  always_comb begin
    p1m = pos(16); p2 = pos(17); p2t = pos(26); p3 = pos(27); p3m = pos(31);
    p4 = pos(32); p4t = pos(35); p5 = pos(36); p5m = pos(37); p6 = pos(39);

    lc.s1_sel = cnt[4];
    lc.s1_mj  = p1m[4] & p1m[3];
    lc.s2_sel = p2[3];
    lc.s2_ccm = ccm1_decode(tf2_of({p2t[3], p2t[4]}, {p2t[2], p2t[1]}));
    lc.s3_sel = p3[2];
    lc.s3_mj  = p3m[2] & p3m[1];
    lc.s4_sel = p4[1];
    lc.s5_sel = p5[0];
    lc.s5_mj  = p5m[0];

    kp = {p4t[1], p4t[2], p4t[3], p4t[4]};
    for (int l = 0; l < LANES; l++)
      tf4_e[l] = 7'({p4t[0], 2'(l)}) * 7'(kp);

    s6_ks   = p6[0];
    out_pos = pos(LAT);
    out_ok  = (fill == 6'(LAT));
  end
endmodule
