// Early output adder: resolves the four lowest bits of each cycle's
// redundant reduction result into final product bits.
//
// After every cycle the four least significant bits of the accumulated
// partial product are final and leave for the lower half of the product
// register; in carry-save form they still hold some carry bits, which this
// adder absorbs. Its carry-out, of weight 2^4, is kept in the flip-flop F
// (outside this module) and re-enters the next cycle at weight 2^0.
//   RADIX 2 : carries at weights 2,4,8 -> 4-bit adder, F enters as cin.
//   RADIX 4 : one carry at weight 4    -> bits 1:0 pass, 2-bit adder on 3:2;
//             cin is not used (F re-enters the reduction tree instead).
//   RADIX 16: no carry below weight 16 -> the adder vanishes, bits pass.
// c_lo[w] is the carry of weight 2^w (c_lo[0] is unused); bits of c_lo that
// do not exist for the radix are ignored. Combinational.
module early_out_adder #(
  parameter int RADIX = 4
) (
  input  logic [3:0] s_lo,
  input  logic [3:1] c_lo,
  input  logic       cin,
  output logic [3:0] p_lo,
  output logic       cout
);

  always_comb begin
    if (RADIX == 2) begin
      {cout, p_lo} = {1'b0, s_lo} + {1'b0, c_lo, 1'b0} + 5'(cin);
    end else if (RADIX == 4) begin
      p_lo[1:0]         = s_lo[1:0];
      {cout, p_lo[3:2]} = {1'b0, s_lo[3:2]} + 3'(c_lo[2]);
    end else begin
      p_lo = s_lo;
      cout = 1'b0;
    end
  end

endmodule
