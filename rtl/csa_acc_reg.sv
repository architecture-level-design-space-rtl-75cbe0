// Sum and Carry registers of the radix-16 multiplier, with the early output
// adder's carry flip-flop F: the accumulated partial product in carry-save
// form.
//
// On clear all three are zeroed (start of a multiplication). On shift they
// take the reduction tree's result moved right by one digit (4 bits): the
// Sum register keeps bits N+3..4 of the sum vector; the Carry register keeps
// the sparse carries of weight 2^4 and up, re-indexed so that bit j again has
// weight 2^(g*j) (g = log2(PPR_RADIX), N/g bits); F takes the early output
// adder's carry-out. The carries of weight below 2^4 are consumed by the
// early output adder, and the topmost carry is always zero (the value is
// below 2^(N+4)). Clear has priority over shift. Asynchronous active-low
// reset. Register widths follow the block diagrams (n-bit Sum, n/2 or n/4
// bit Carry); the handshake signals are this design's own.
module csa_acc_reg
  import r16_mult_pkg::*;
#(
  parameter int  N     = 32,
  parameter int  RADIX = 16,
  localparam int W     = N + 4,
  localparam int G     = radix_bits(RADIX),
  localparam int NG    = W / G,
  localparam int NC    = N / G
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          shift,
  input  logic [W-1:0]  red_s,   // reduction tree sum vector
  input  logic [NG-1:0] red_c,   // reduction tree carries, bit j of weight 2^(g(j+1))
  input  logic          f_next,  // early output adder carry-out
  output logic [N-1:0]  sum_q,
  output logic [NC-1:0] car_q,   // bit j of weight 2^(g*j)
  output logic          f_q
);

  // carries of weight >= 2^4, re-aligned for the 4-bit shift
  logic [NC-1:0] car_next;
  always_comb begin
    for (int j = 0; j < NC; j++) car_next[j] = red_c[j + 4 / G - 1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0;
      car_q <= '0;
      f_q   <= 1'b0;
    end else if (clear) begin
      sum_q <= '0;
      car_q <= '0;
      f_q   <= 1'b0;
    end else if (shift) begin
      sum_q <= red_s[W-1:4];
      car_q <= car_next;
      f_q   <= f_next;
    end
  end

endmodule
