// delay_line: feedback buffer of a delay-feedback stage, DEPTH complex words
// deep (16D, 8D, 4D, 2D and D in the four data paths, 31 words per path).
// It is a shift register that moves one place on every cycle with en=1, so
// the word written is read back DEPTH enabled cycles later. No reset: the
// words are overwritten before they reach a valid output.
module delay_line #(
  parameter int W     = 10,
  parameter int DEPTH = 16
) (
  input  logic                clk,
  input  logic                en,
  input  logic signed [W-1:0] in_re, in_im,
  output logic signed [W-1:0] out_re, out_im
);
  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cplx_t;

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      mem[0] <= '{re: in_re, im: in_im};
      for (int i = 1; i < DEPTH; i++) mem[i] <= mem[i-1];
    end
  end

  assign out_re = mem[DEPTH-1].re;
  assign out_im = mem[DEPTH-1].im;
endmodule
