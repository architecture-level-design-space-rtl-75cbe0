// Carry select adder, a final adder option.
//
// The operands are cut into blocks of BLOCK bits (the last block may be
// shorter). The lowest block is a ripple adder fed by cin; every other block
// holds two ripple adders, one assuming a carry-in of 0 and one of 1, and
// the carry out of the block below selects the result and the carry to pass
// on. The uniform block size of 4 is this design's choice. sum = a + b + cin,
// cout is the carry out of bit N-1. Combinational.
module adder_csl #(
  parameter int N     = 32,
  parameter int BLOCK = 4,
  localparam int NB   = (N + BLOCK - 1) / BLOCK,
  localparam int WP   = NB * BLOCK
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [WP-1:0] ap, bp, sp;
  logic [NB:0]   bc;          // bc[k]: carry into block k

  assign ap    = WP'(a);
  assign bp    = WP'(b);
  assign bc[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    // both candidate results of the block, then the select
    logic [BLOCK:0] r0, r1;
    assign r0 = {1'b0, ap[k*BLOCK +: BLOCK]} + {1'b0, bp[k*BLOCK +: BLOCK]};
    assign r1 = {1'b0, ap[k*BLOCK +: BLOCK]} + {1'b0, bp[k*BLOCK +: BLOCK]} + (BLOCK+1)'(1);
    assign {bc[k+1], sp[k*BLOCK +: BLOCK]} = bc[k] ? r1 : r0;
  end

  assign sum = sp[N-1:0];
  // carry out of bit N-1 (inside the last block when N is not a multiple)
  if (WP == N) begin : g_cout_full
    assign cout = bc[NB];
  end else begin : g_cout_part
    assign cout = sp[N];
  end

endmodule
