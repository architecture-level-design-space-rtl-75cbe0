// Self-checking testbench of the early output adder (early_out_adder).
//
// Exhaustive over the 4 sum bits, the 3 carry bits and cin, for radix 2, 4
// (default) and 16. The expected value {cout, p_lo} is the sum of the bits
// the radix actually carries: radix 2 all carries plus cin, radix 4 only the
// carry of weight 4, radix 16 none.
module tb_early_out_adder;

  int checks = 0;
  int failures = 0;

  logic [3:0] s_lo;
  logic [3:1] c_lo;
  logic       cin;
  logic [3:0] p2, p4, p16;
  logic       o2, o4, o16;

  early_out_adder #(.RADIX(2))  u2  (.s_lo, .c_lo, .cin, .p_lo(p2),  .cout(o2));
  early_out_adder               u4  (.s_lo, .c_lo, .cin, .p_lo(p4),  .cout(o4));
  early_out_adder #(.RADIX(16)) u16 (.s_lo, .c_lo, .cin, .p_lo(p16), .cout(o16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int e2, e4, e16;
      {cin, c_lo, s_lo} = 8'(v);
      #1;
      e2  = int'(s_lo) + 2*int'(c_lo[1]) + 4*int'(c_lo[2]) + 8*int'(c_lo[3]) + int'(cin);
      e4  = int'(s_lo) + 4*int'(c_lo[2]);
      e16 = int'(s_lo);
      checks += 3;
      if (int'({o2, p2}) != e2)   begin failures++; $display("FAIL radix 2 v=%h", v); end
      if (int'({o4, p4}) != e4)   begin failures++; $display("FAIL radix 4 v=%h", v); end
      if (int'({o16, p16}) != e16) begin failures++; $display("FAIL radix 16 v=%h", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
