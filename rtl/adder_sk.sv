// Sklansky (divide-and-conquer) parallel prefix adder, a final adder option.
//
// At prefix level l the positions are split into blocks of 2^(l+1); every
// position in the upper half of a block merges with the last position of the
// lower half. log2 N levels and few cells, at the price of fan-out that
// doubles level by level. The carry-in is folded into the generate of bit 0.
// sum = a + b + cin, cout is the carry out of bit N-1. Combinational.
module adder_sk #(
  parameter int N = 32,
  localparam int L = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  // level l (d = 2^(l-1)): the upper half of every 2d-block merges with
  // the last position of its lower half
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [N-1:0] g, p;
    if (l == 0) begin : g_bits
      always_comb begin
        g    = a & b;
        p    = a ^ b;
        g[0] = (a[0] & b[0]) | ((a[0] ^ b[0]) & cin);
      end
    end else begin : g_merge
      always_comb begin
        for (int i = 0; i < N; i++) begin
          if ((i % (2 << (l-1))) >= (1 << (l-1))) begin
            g[i] = g_lvl[l-1].g[i] | (g_lvl[l-1].p[i] & g_lvl[l-1].g[(i / (2 << (l-1))) * (2 << (l-1)) + (1 << (l-1)) - 1]);
            p[i] = g_lvl[l-1].p[i] & g_lvl[l-1].p[(i / (2 << (l-1))) * (2 << (l-1)) + (1 << (l-1)) - 1];
          end else begin
            g[i] = g_lvl[l-1].g[i];
            p[i] = g_lvl[l-1].p[i];
          end
        end
      end
    end
  end

  // carry into bit i is the prefix generate of bits [i-1:0] (with cin)
  assign sum  = g_lvl[0].p ^ {g_lvl[L].g[N-2:0], cin};
  assign cout = g_lvl[L].g[N-1];

endmodule
