// bf_addsub: real adder/subtractor pair of a butterfly, a+b and a-b
// (the subtraction is the adder fed with the two's complement of b).
// SCALE=1 halves both results with round-half-up, SCALE=0 keeps full scale;
// both saturate to the W-bit range (with SCALE=1 only the largest difference,
// (2^(W-1)-1) - (-2^(W-1)), would round out of range). Combinational.
module bf_addsub #(
  parameter int W     = 10,
  parameter bit SCALE = 1'b0
) (
  input  logic signed [W-1:0] a, b,
  output logic signed [W-1:0] sum, dif
);
  localparam logic signed [W:0] MAXV = (W+1)'((1 <<< (W-1)) - 1);
  localparam logic signed [W:0] MINV = -(W+1)'(1 <<< (W-1));

  function automatic logic signed [W-1:0] fit(logic signed [W:0] v);
    logic signed [W+1:0] r;
    r = ((W+2)'(v) + (W+2)'(1)) >>> 1;
    if (SCALE) v = r[W:0];   // only (2^(W-1)-1) - (-2^(W-1)) rounds out of range
    if (v > MAXV)      return MAXV[W-1:0];
    else if (v < MINV) return MINV[W-1:0];
    else               return v[W-1:0];
  endfunction

  always_comb begin
    sum = fit((W+1)'(a) + (W+1)'(b));
    dif = fit((W+1)'(a) - (W+1)'(b));
  end
endmodule
