// Final carry-propagate adder of the multiplier, architecture chosen by a
// parameter: Kogge-Stone, Sklansky, Brent-Kung, carry look-ahead (blocking
// factor 4, the default) or carry select. It turns the redundant upper half
// of the product (sum vector + sparse carry vector + carry flip-flop) into
// binary. sum = a + b + cin. Combinational.
module final_adder
  import r16_mult_pkg::*;
#(
  parameter int     N    = 32,
  parameter adder_e ARCH = ADD_CLA
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  if (ARCH == ADD_KS) begin : g_ks
    adder_ks  #(.N(N)) u_add (.a, .b, .cin, .sum, .cout);
  end else if (ARCH == ADD_SK) begin : g_sk
    adder_sk  #(.N(N)) u_add (.a, .b, .cin, .sum, .cout);
  end else if (ARCH == ADD_BK) begin : g_bk
    adder_bk  #(.N(N)) u_add (.a, .b, .cin, .sum, .cout);
  end else if (ARCH == ADD_CSL) begin : g_csl
    adder_csl #(.N(N)) u_add (.a, .b, .cin, .sum, .cout);
  end else begin : g_cla
    adder_cla #(.N(N)) u_add (.a, .b, .cin, .sum, .cout);
  end

endmodule
