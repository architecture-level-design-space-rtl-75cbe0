// Self-checking testbench of the product register (product_reg).
//
// Shifts in N/4 random 4-bit groups (N = 32 default and N = 64), loads a
// random upper half, and checks that the lower half holds the groups in
// order (first group lowest), the upper half the loaded value, and that
// both hold when neither control is active.
module tb_product_reg;

  int checks = 0;
  int failures = 0;

  logic         clk = 0, rst_n = 0, shift_lo = 0, load_hi = 0;
  logic [3:0]   lo_bits = '0;
  logic [63:0]  hi_sum = '0;
  logic [63:0]  p32;
  logic [127:0] p64;

  product_reg           u32 (.clk, .rst_n, .shift_lo, .lo_bits, .load_hi, .hi_sum(hi_sum[31:0]), .product(p32));
  product_reg #(.N(64)) u64 (.clk, .rst_n, .shift_lo, .lo_bits, .load_hi, .hi_sum,              .product(p64));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [63:0] lo, hv;
      lo = {$urandom, $urandom};
      hv = {$urandom, $urandom};
      // 16 groups: the 32-bit instance keeps the last 8
      for (int k = 0; k < 16; k++) begin
        lo_bits = lo[4*k +: 4]; shift_lo = 1;
        @(posedge clk); #1;
      end
      shift_lo = 0;
      hi_sum = hv; load_hi = 1;
      @(posedge clk); #1;
      load_hi = 0;
      lo_bits = 4'($urandom); hi_sum = {$urandom, $urandom};
      @(posedge clk); #1;   // nothing enabled: must hold
      checks += 4;
      if (p64[127:64] !== hv) begin failures++; $display("FAIL N=64 upper half"); end
      if (p32[63:32] !== hv[31:0]) begin failures++; $display("FAIL N=32 upper half"); end
      if (p64[63:0] !== lo) begin failures++; $display("FAIL N=64 lower half"); end
      if (p32[31:0] !== lo[63:32]) begin failures++; $display("FAIL N=32 lower half"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
