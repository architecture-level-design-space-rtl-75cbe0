// Brent-Kung parallel prefix adder, a final adder option.
//
// An up-sweep tree (levels 0..L-1: position k*2d+2d-1 merges with the one d
// below it, d = 2^l) forms the prefixes of all power-of-two spans; a
// down-sweep (d = 2^(L-1) .. 1: positions 3d-1, 5d-1, ... merge with the one
// d below) fills in the remaining positions. About 2N cells and 2 log2 N
// levels, fan-out 2: the smallest and slowest of the prefix adders. The
// carry-in is folded into the generate of bit 0. sum = a + b + cin, cout is
// the carry out of bit N-1. Combinational.
module adder_bk #(
  parameter int N = 32,
  localparam int L = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  // levels 1..L: up-sweep, d = 2^(l-1), positions k*2d+2d-1 merge with i-d;
  // levels L+1..2L: down-sweep, d = 2^(2L-l), positions 3d-1, 5d-1, ...
  // merge with i-d
  for (genvar l = 0; l <= 2*L; l++) begin : g_lvl
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
          if ((l <= L) ? ((i % (2 << (l-1))) == (2 << (l-1)) - 1)
                       : (i >= 3 * (1 << (2*L-l)) - 1 && (i % (2 << (2*L-l))) == (1 << (2*L-l)) - 1)) begin
            g[i] = g_lvl[l-1].g[i] | (g_lvl[l-1].p[i] & g_lvl[l-1].g[i - ((l <= L) ? (1 << (l-1)) : (1 << (2*L-l)))]);
            p[i] = g_lvl[l-1].p[i] & g_lvl[l-1].p[i - ((l <= L) ? (1 << (l-1)) : (1 << (2*L-l)))];
          end else begin
            g[i] = g_lvl[l-1].g[i];
            p[i] = g_lvl[l-1].p[i];
          end
        end
      end
    end
  end

  // carry into bit i is the prefix generate of bits [i-1:0] (with cin)
  assign sum  = g_lvl[0].p ^ {g_lvl[2*L].g[N-2:0], cin};
  assign cout = g_lvl[2*L].g[N-1];

endmodule
