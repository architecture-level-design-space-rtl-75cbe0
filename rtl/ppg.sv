// Partial product generator of the radix-16 sequential multiplier.
//
// Instead of precomputing all multiples 0..15 of X, only the four easy
// multiples X, 2X, 4X and 8X are formed (plain wiring shifts), and each is
// gated by one bit of the current multiplier digit Y[i+3:i]:
//   pp[k] = Y[i+k] ? (X << k) : 0,  k = 0..3.
// The four components together equal digit*X. They are N+4 bits wide so
// that 8X fits with room for the accumulation that follows (the document's
// figures label these buses n bits). Purely combinational.
module ppg #(
  parameter int N = 32
) (
  input  logic [N-1:0]      x,
  input  logic [3:0]        digit,
  output logic [3:0][N+3:0] pp
);

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      pp[k] = digit[k] ? ((N+4)'(x) << k) : '0;
    end
  end

endmodule
