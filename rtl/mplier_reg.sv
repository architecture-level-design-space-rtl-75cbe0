// Multiplier (Y) register of the radix-16 multiplier.
//
// Loaded with Y at the start of a multiplication and shifted right by one
// radix-16 digit (4 bits) in every accumulation cycle, so that digit always
// presents Y[i+3:i] of the digit being worked on, least significant digit
// first. load has priority over shift. Asynchronous active-low reset.
module mplier_reg #(
  parameter int N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] y,
  output logic [3:0]   digit
);

  logic [N-1:0] y_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     y_q <= '0;
    else if (load)  y_q <= y;
    else if (shift) y_q <= y_q >> 4;
  end

  assign digit = y_q[3:0];

endmodule
