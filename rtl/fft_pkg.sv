// fft_pkg: constants and control types shared by the 128-point four-path
// mixed-radix FFT. It fixes the transform size (128 points, four parallel
// data paths, 32 clocks per symbol), names the seven stage-2 twiddle factors
// and gives the CCM1 select encoding of each (the four CCM1 select signals).
// The stage-2 twiddle exponent (k1+2k2)(2n3+n4) of W16 is mapped onto the
// seven factors by tf2_of(); ccm1_decode() turns a factor into the select
// word. Don't-care selects are driven as 0.
package fft_pkg;
  localparam int N      = 128;        // transform size
  localparam int LANES  = 4;          // parallel data paths
  localparam int FRAME  = N / LANES;  // clocks per symbol (32)
  localparam int WL     = 10;         // internal word length of the main configuration

  // The seven twiddle factors needed after stage 2.
  typedef enum logic [2:0] {
    TF_ONE    = 3'd0,   // 1
    TF_W8     = 3'd1,   // W8^1
    TF_MJ     = 3'd2,   // -j
    TF_MJW8   = 3'd3,   // -j W8^1
    TF_W16_1  = 3'd4,   // W16^1
    TF_W16_3  = 3'd5,   // W16^3
    TF_MW16_1 = 3'd6    // -W16^1
  } tf2_e;

  // CCM1 control word: sel1 swaps Re/Im at the input, sel2 picks the
  // cos(pi/4) products, sel3 picks the adder results, sel4 maps the pair
  // (P,Q) to the output: 0 (P,Q), 1 (-P,-Q), 2 (Q,-P), 3 (P,-Q).
  typedef struct packed {
    logic       sel1;
    logic       sel2;
    logic       sel3;
    logic [1:0] sel4;
  } ccm1_sel_t;

  function automatic ccm1_sel_t ccm1_decode(tf2_e tf);
    ccm1_sel_t s;
    unique case (tf)
      TF_ONE:    s = '{sel1: 1'b0, sel2: 1'b0, sel3: 1'b0, sel4: 2'd0};
      TF_W8:     s = '{sel1: 1'b0, sel2: 1'b1, sel3: 1'b1, sel4: 2'd0};
      TF_MJ:     s = '{sel1: 1'b0, sel2: 1'b0, sel3: 1'b0, sel4: 2'd2};
      TF_MJW8:   s = '{sel1: 1'b0, sel2: 1'b1, sel3: 1'b1, sel4: 2'd2};
      TF_W16_1:  s = '{sel1: 1'b0, sel2: 1'b0, sel3: 1'b1, sel4: 2'd0};
      TF_W16_3:  s = '{sel1: 1'b1, sel2: 1'b0, sel3: 1'b1, sel4: 2'd3};
      TF_MW16_1: s = '{sel1: 1'b0, sel2: 1'b0, sel3: 1'b1, sel4: 2'd1};
      default:   s = '{sel1: 1'b0, sel2: 1'b0, sel3: 1'b0, sel4: 2'd0};
    endcase
    return s;
  endfunction

  // Per-cycle controls shared by the four data paths (stages 1-5).
  typedef struct packed {
    logic      s1_sel;   // stage-1 butterfly: 0 pass/load, 1 sum/difference
    logic      s1_mj;    // stage-1 -j (W4^(n2*k1))
    logic      s2_sel;   // stage-2 butterfly
    ccm1_sel_t s2_ccm;   // stage-2 twiddle W16^((k1+2k2)(2n3+n4))
    logic      s3_sel;   // stage-3 butterfly
    logic      s3_mj;    // stage-3 -j (W4^(n4*k3))
    logic      s4_sel;   // stage-4 butterfly
    logic      s5_sel;   // stage-5 butterfly
    logic      s5_mj;    // stage-5 -j (W4^(n6*k5)), used by paths 2 and 3
  } lane_ctrl_t;

  // One radix-4 (modified) Booth digit: value is (neg ? -1 : 1) * (two ? 2 : one ? 1 : 0).
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_dig_t;

  // Stage-2 twiddle W16^((k1+2k2)(2n3+n4)); kk = k1+2k2, nn = 2n3+n4.
  function automatic tf2_e tf2_of(logic [1:0] kk, logic [1:0] nn);
    tf2_e t;
    unique case (4'(kk) * 4'(nn))
      4'd0:    t = TF_ONE;
      4'd1:    t = TF_W16_1;
      4'd2:    t = TF_W8;
      4'd3:    t = TF_W16_3;
      4'd4:    t = TF_MJ;
      4'd6:    t = TF_MJW8;
      4'd9:    t = TF_MW16_1;
      default: t = TF_ONE;   // products 5, 7, 8 cannot occur
    endcase
    return t;
  endfunction
endpackage
