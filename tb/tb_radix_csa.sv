// Self-checking testbench of the radix-2^g carry-save adder (radix_csa).
//
// Instances for radix 2, 4 and 16 (W = 36, and the default) get random
// operands. For each, the testbench recomputes every g-bit group sum
// a+s+c[j] on its own and compares sum bits and group carry; it also checks
// that the value is preserved: s_out + sum_j c_out[j]*2^(g(j+1)) equals
// a + s + sum_j c[j]*2^(gj).
module tb_radix_csa;

  int checks = 0;
  int failures = 0;

  logic [35:0] a, s;
  logic [35:0] c;          // sparse carries; low W/g bits used per radix
  logic [35:0] so2, so4, so16, sod;
  logic [35:0] co2;
  logic [17:0] co4;
  logic [8:0]  co16, cod;

  radix_csa #(.W(36), .RADIX(2))  u2  (.a, .s, .c(c),       .s_out(so2),  .c_out(co2));
  radix_csa #(.W(36), .RADIX(4))  u4  (.a, .s, .c(c[17:0]), .s_out(so4),  .c_out(co4));
  radix_csa #(.W(36), .RADIX(16)) u16 (.a, .s, .c(c[8:0]),  .s_out(so16), .c_out(co16));
  radix_csa                       ud  (.a, .s, .c(c[8:0]),  .s_out(sod),  .c_out(cod));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // value and group check for group width g
  task automatic check_radix(int g, logic [35:0] so, logic [35:0] co);
    logic [63:0] vin, vout;
    int ng;
    ng = 36 / g;
    vin  = 64'(a) + 64'(s);
    vout = 64'(so);
    for (int j = 0; j < ng; j++) begin
      int gs;
      gs = 0;
      vin  += 64'(c[j]) << (g*j);
      vout += 64'(co[j]) << (g*(j+1));
      for (int b = 0; b < g; b++) gs += (int'(a[g*j+b]) + int'(s[g*j+b])) << b;
      gs += int'(c[j]);
      checks++;
      if (int'((so >> (g*j)) & 36'((1 << g) - 1)) != gs % (1 << g) || co[j] != ((gs >> g) & 1)) begin
        failures++;
        $display("FAIL g=%0d group %0d", g, j);
      end
    end
    checks++;
    if (vin !== vout) begin failures++; $display("FAIL value g=%0d", g); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = {$urandom, $urandom};
      s = {$urandom, $urandom};
      c = {$urandom, $urandom};
      if (t == 0) begin a = '1; s = '1; c = '1; end
      #1;
      check_radix(1, so2, co2);
      check_radix(2, so4, 36'(co4));
      check_radix(4, so16, 36'(co16));
      checks++;
      if (sod !== so16 || cod !== co16) begin failures++; $display("FAIL default radix"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
