// Hierarchical carry look-ahead adder with blocking factor 4, the final
// adder of the multiplier's default configuration.
//
// Bit generate/propagate signals are grouped four at a time into block
// generate/propagate signals, those again four at a time, and so on for
// L = ceil(log4 N) levels (the width is padded with zeros to 4^L). Carries
// are then distributed top-down: at every level a 4-bit look-ahead carry
// unit turns the carry into a block and the four sub-block (G, P) pairs into
// the carries of the sub-blocks. sum = a + b + cin, cout is the carry out of
// bit N-1. Combinational.
module adder_cla #(
  parameter int N  = 32,
  localparam int L = (N > 4) ? ($clog2(N) + 1) / 2 : 1,
  localparam int WP = 1 << (2 * L)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  // gg[l][j], pp[l][j]: generate/propagate of block j of 4^l bits
  logic [L:0][WP-1:0] gg, pp;
  logic [WP:0]        c;    // c[i]: carry into bit i

  always_comb begin
    gg = '0;
    pp = '0;
    gg[0][N-1:0] = a & b;
    pp[0][N-1:0] = a ^ b;
    for (int l = 1; l <= L; l++) begin
      for (int j = 0; j < (WP >> (2*l)); j++) begin
        gg[l][j] = gg[l-1][4*j+3]
                 | (pp[l-1][4*j+3] & gg[l-1][4*j+2])
                 | (pp[l-1][4*j+3] & pp[l-1][4*j+2] & gg[l-1][4*j+1])
                 | (pp[l-1][4*j+3] & pp[l-1][4*j+2] & pp[l-1][4*j+1] & gg[l-1][4*j]);
        pp[l][j] = &pp[l-1][4*j +: 4];
      end
    end
    c    = '0;
    c[0] = cin;
    c[WP] = gg[L][0] | (pp[L][0] & cin);
    for (int l = L; l >= 1; l--) begin
      for (int j = 0; j < (WP >> (2*l)); j++) begin
        // look-ahead carry unit of block j at level l (4^l bits from base)
        automatic int base = j << (2*l);
        automatic int hs   = 1 << (2*(l-1));
        c[base + hs]   = gg[l-1][4*j] | (pp[l-1][4*j] & c[base]);
        c[base + 2*hs] = gg[l-1][4*j+1]
                       | (pp[l-1][4*j+1] & gg[l-1][4*j])
                       | (pp[l-1][4*j+1] & pp[l-1][4*j] & c[base]);
        c[base + 3*hs] = gg[l-1][4*j+2]
                       | (pp[l-1][4*j+2] & gg[l-1][4*j+1])
                       | (pp[l-1][4*j+2] & pp[l-1][4*j+1] & gg[l-1][4*j])
                       | (pp[l-1][4*j+2] & pp[l-1][4*j+1] & pp[l-1][4*j] & c[base]);
      end
    end
    sum  = pp[0][N-1:0] ^ c[N-1:0];
    cout = c[N];
  end

endmodule
