// Partial product reduction of one cycle of the radix-16 multiplier.
//
// Six operands meet every cycle: the accumulated partial product, held
// redundantly as a sum vector acc_s and a sparse carry vector acc_c (already
// shifted right by one digit), and the four partial product components of
// the PPG. A plain radix-2 CSA compresses components 1..3 into two full
// vectors. Three radix-k CSAs in a chain then add, in turn, component 0,
// the plain CSA's carry and the plain CSA's sum into the accumulator, giving
// a new (sum, sparse carry) pair. Which component enters which CSA input is
// this design's choice; the structure follows the document's block diagrams.
//
// acc_c bit j has weight 2^(g*j), g = log2(RADIX); c_out bit j has weight
// 2^(g*(j+1)). The lowest carry slot of the second radix-k CSA is free
// (the first CSA never produces a carry of weight 1); for RADIX 4 it takes
// the early-output-adder flip-flop F (f_in). For RADIX 2 and 16, f_in is not
// used (RADIX 2 adds F in the early output adder, RADIX 16 has no F).
// All vectors are N+4 bits wide; the value they hold stays below 2^(N+4),
// so the carries dropped at the top are always zero. Combinational.
module ppr_tree
  import r16_mult_pkg::*;
#(
  parameter int N     = 32,
  parameter int RADIX = 16,
  localparam int W    = N + 4,
  localparam int G    = radix_bits(RADIX),
  localparam int NG   = W / G,
  localparam int NC   = N / G
) (
  input  logic [3:0][W-1:0] pp,
  input  logic [N-1:0]      acc_s,
  input  logic [NC-1:0]     acc_c,
  input  logic              f_in,
  output logic [W-1:0]      s_out,
  output logic [NG-1:0]     c_out
);

  // plain carry-save adder on components 1..3
  logic [W-1:0] t_s, t_c, t_cv;
  radix_csa #(.W(W), .RADIX(2)) u_csa (
    .a(pp[1]), .s(pp[2]), .c(pp[3]), .s_out(t_s), .c_out(t_c)
  );
  assign t_cv = {t_c[W-2:0], 1'b0};   // carry j has weight 2^(j+1)

  // chain of three radix-k CSAs
  logic [W-1:0]  s1, s2;
  logic [NG-1:0] c1, c2, c2_in, c3_in;

  radix_csa #(.W(W), .RADIX(RADIX)) u_rcsa1 (
    .a(pp[0]), .s(W'(acc_s)), .c(NG'(acc_c)), .s_out(s1), .c_out(c1)
  );

  assign c2_in = {c1[NG-2:0], (RADIX == 4) ? f_in : 1'b0};
  radix_csa #(.W(W), .RADIX(RADIX)) u_rcsa2 (
    .a(t_cv), .s(s1), .c(c2_in), .s_out(s2), .c_out(c2)
  );

  assign c3_in = {c2[NG-2:0], 1'b0};
  radix_csa #(.W(W), .RADIX(RADIX)) u_rcsa3 (
    .a(t_s), .s(s2), .c(c3_in), .s_out(s_out), .c_out(c_out)
  );

endmodule
