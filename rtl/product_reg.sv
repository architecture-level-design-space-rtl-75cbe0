// Product register of the radix-16 multiplier.
//
// Lower half: a shift register that takes the four finished product bits of
// every accumulation cycle at its top and moves right by 4, so after N/4
// cycles the first digit's bits sit at the bottom. Upper half: loaded once,
// from the final adder, in the final-addition cycle. Both halves hold their
// value until the next multiplication. Asynchronous active-low reset.
module product_reg #(
  parameter int N = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_lo,   // accumulation cycle
  input  logic [3:0]     lo_bits,    // finished bits of this cycle
  input  logic           load_hi,    // final-addition cycle
  input  logic [N-1:0]   hi_sum,     // final adder result
  output logic [2*N-1:0] product
);

  logic [N-1:0] plo_q, phi_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      plo_q <= '0;
      phi_q <= '0;
    end else begin
      if (shift_lo) plo_q <= {lo_bits, plo_q[N-1:4]};
      if (load_hi)  phi_q <= hi_sum;
    end
  end

  assign product = {phi_q, plo_q};

endmodule
