// Kogge-Stone parallel prefix adder, one of the final adder options.
//
// Bit generate/propagate signals are combined in ceil(log2 N) prefix levels;
// at level l every position i >= 2^l merges with position i-2^l, so each
// level has (almost) N prefix cells and every node has fan-out 2: fastest,
// largest and most power-hungry of the prefix adders. The carry-in is folded
// into the generate of bit 0. sum = a + b + cin, cout is the carry out of
// bit N-1. Combinational.
module adder_ks #(
  parameter int N = 32,
  localparam int L = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  // one generate level per prefix level: g/p of level l is the group
  // generate/propagate of bits [i : i-2^l+1] (saturating at bit 0)
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
          if (i >= (1 << (l-1))) begin
            g[i] = g_lvl[l-1].g[i] | (g_lvl[l-1].p[i] & g_lvl[l-1].g[i - (1 << (l-1))]);
            p[i] = g_lvl[l-1].p[i] & g_lvl[l-1].p[i - (1 << (l-1))];
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
