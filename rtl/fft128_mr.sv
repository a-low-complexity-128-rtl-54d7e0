// fft128_mr: 128-point four-path mixed-radix FFT/IFFT processor.
// Four samples enter per enabled clock, x(4m), x(4m+1), x(4m+2), x(4m+3) for
// m = 0..31 (32 enabled clocks per symbol); four results leave per clock in
// bit-reversed order: at output index t, lane q holds X(k) with
// bitrev7(k) = 4t + q (lane 0 gives X(0), X(16), X(8), ...).
// Stages 1-4 implement a modified radix-2^4 DIF decomposition, in which part
// of the stage-3 twiddle is moved to stage 2 so that stage 3 needs only -j;
// stages 5-7 a radix-2^3 one. Nontrivial multiplication is then needed only
// in stage 4 (four complex Booth multipliers), with constant multipliers in
// stage 2 (four CCM1) and stage 6 (CCM2, CCM3).
// Interface: in_valid advances the whole pipeline by one step (no data moves
// while it is low); the first valid set after reset is sample set 0 of a
// symbol and symbols follow back to back in valid cycles. Result set t of a
// symbol is registered on the valid clock that enters input set t+40, so the
// last symbol is pushed out by 40 sets of the next one (or of dummy data).
// With in_valid held high, a symbol's results start 41 clocks after its
// first input set and follow at one set per clock.
// out_valid is high for one clock per result set, registered; out_sop marks
// set 0. Results are X(k)/16 (stages 1, 3, 5, 7 halve, own choice).
// in_ifft = 1 computes the IFFT by conjugating input and output; the mode
// travels with the data, so it may change between symbols. Output then is
// 8 * x(n) (= 128/16). Synchronous active-low reset of the control only.
module fft128_mr
  import fft_pkg::*;
#(
  parameter int       W           = 10,
  parameter int       CW          = 11,
  parameter int       G           = 8,
  parameter bit [6:0] STAGE_SCALE = 7'b1010101
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_ifft,
  input  logic signed [W-1:0] in_re [LANES],
  input  logic signed [W-1:0] in_im [LANES],
  output logic                out_valid,
  output logic                out_sop,
  output logic                out_ifft,
  output logic signed [W-1:0] out_re [LANES],
  output logic signed [W-1:0] out_im [LANES]
);
  localparam int LAT = 40;
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  lane_ctrl_t          lc;
  logic [6:0]          tf4_e [LANES];
  logic                ks, out_ok;
  logic [4:0]          out_pos;
  logic signed [W-1:0] li_im [LANES];
  logic signed [W-1:0] lo_re [LANES], lo_im [LANES];
  logic signed [W-1:0] t_re [LANES], t_im [LANES];
  logic [LAT-1:0]      mode_sr;

  function automatic logic signed [W-1:0] neg(logic signed [W-1:0] v);
    return (v == MINV) ? ~MINV : -v;
  endfunction

  fft_ctrl #(.LAT(LAT)) u_ctrl (.clk, .rst_n, .en(in_valid),
    .lc, .tf4_e, .s6_ks(ks), .out_ok, .out_pos);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    assign li_im[l] = in_ifft ? neg(in_im[l]) : in_im[l];
    fft_lane #(.W(W), .CW(CW), .G(G), .LANE(l), .STAGE_SCALE(STAGE_SCALE)) u_lane (
      .clk, .en(in_valid), .lc, .tf4_e(tf4_e[l]),
      .in_re(in_re[l]), .in_im(li_im[l]), .out_re(lo_re[l]), .out_im(lo_im[l]));
  end

  fft_tail #(.W(W), .G(G), .STAGE_SCALE(STAGE_SCALE)) u_tail (
    .clk, .en(in_valid), .ks, .in_re(lo_re), .in_im(lo_im), .out_re(t_re), .out_im(t_im));

  // IFFT mode bit, delayed with the data
  always_ff @(posedge clk)
    if (in_valid) mode_sr <= {mode_sr[LAT-2:0], in_ifft};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
    end else begin
      out_valid <= in_valid & out_ok;
      out_sop   <= in_valid & out_ok & (out_pos == 5'd0);
    end
    if (in_valid) begin
      out_ifft <= mode_sr[LAT-1];
      for (int l = 0; l < LANES; l++) begin
        out_re[l] <= t_re[l];
        out_im[l] <= mode_sr[LAT-1] ? neg(t_im[l]) : t_im[l];
      end
    end
  end
endmodule
