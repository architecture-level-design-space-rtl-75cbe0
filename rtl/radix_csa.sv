// Radix-2^g carry-save adder used for partial product reduction.
//
// One operand is redundant: a full sum vector s plus a sparse carry vector c
// holding one bit per g-bit group (bit j has weight 2^(g*j), the group's
// least significant position). The other operand a is a plain binary
// vector. Each g-bit group is a g-bit ripple adder:
//   {c_out[j], s_out[g*j+g-1 : g*j]} = a[group] + s[group] + c[j]
// so the result is again a sum vector plus one carry bit per group, the
// carry of group j having weight 2^(g*(j+1)). With g = 1 (radix 2) this is
// the ordinary full-adder row; g = 2 (radix 4) and g = 4 (radix 16) give
// the sparser carries and 2- and 4-bit carry chains of the document's dot
// diagrams. Group boundaries at multiples of g from bit 0 are this design's
// choice. Combinational. W must be a multiple of g.
module radix_csa
  import r16_mult_pkg::*;
#(
  parameter int W     = 36,
  parameter int RADIX = 16,
  localparam int G    = radix_bits(RADIX),
  localparam int NG   = W / G
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  s,
  input  logic [NG-1:0] c,
  output logic [W-1:0]  s_out,
  output logic [NG-1:0] c_out
);

  always_comb begin
    for (int j = 0; j < NG; j++) begin
      logic [G:0] grp;
      grp = {1'b0, a[G*j +: G]} + {1'b0, s[G*j +: G]} + (G+1)'(c[j]);
      s_out[G*j +: G] = grp[G-1:0];
      c_out[j]        = grp[G];
    end
  end

  initial begin
    assert (W % G == 0) else $error("radix_csa: W must be a multiple of the group width");
  end

endmodule
