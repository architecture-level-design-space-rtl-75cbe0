// Self-checking testbench of the partial product reduction tree (ppr_tree).
//
// Instances for radix 2, 4 and 16 at N = 32 get random accumulator sum and
// carry vectors, a random F bit and the four components of a random digit
// times a random X (from a ppg instance). The value of the result,
// s_out + sum_j c_out[j]*2^(g(j+1)), must equal acc_s + sum_j acc_c[j]*2^(gj)
// + digit*X, plus F for radix 4 (the only radix that takes F here).
// The accumulator is kept below 2^32, as it is in the multiplier.
module tb_ppr_tree;

  int checks = 0;
  int failures = 0;

  logic [31:0]      x, acc_s, acc_c;
  logic [3:0]       digit;
  logic             f_in;
  logic [3:0][35:0] pp;

  logic [35:0] s2, s4, s16;
  logic [35:0] c2;
  logic [17:0] c4;
  logic [8:0]  c16;

  ppg #(.N(32)) u_ppg (.x, .digit, .pp);
  ppr_tree #(.N(32), .RADIX(2))  u2  (.pp, .acc_s, .acc_c(acc_c),       .f_in, .s_out(s2),  .c_out(c2));
  ppr_tree #(.N(32), .RADIX(4))  u4  (.pp, .acc_s, .acc_c(acc_c[15:0]), .f_in, .s_out(s4),  .c_out(c4));
  ppr_tree                       u16 (.pp, .acc_s, .acc_c(acc_c[7:0]),  .f_in, .s_out(s16), .c_out(c16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] carry_val(logic [35:0] c, int g, int n, int off);
    logic [63:0] v = '0;
    for (int j = 0; j < n; j++) v += 64'(c[j]) << (g*(j+off));
    return v;
  endfunction

  task automatic check(int g, logic [35:0] so, logic [35:0] co, logic [63:0] exp);
    logic [63:0] got;
    got = 64'(so) + carry_val(co, g, 36/g, 1);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL g=%0d got=%h exp=%h", g, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [63:0] base;
      x = $urandom; digit = 4'($urandom); f_in = 1'($urandom);
      acc_s = $urandom; acc_c = $urandom;
      if (t < 16) begin x = '1; digit = 4'(t); acc_s = '1; acc_c = '1; end
      // keep the accumulator value below 2^32 for every radix
      acc_s[31] = 1'b0; acc_c[31] = 1'b0; acc_c[15] = 1'b0; acc_c[7] = 1'b0;
      #1;
      base = 64'(x) * 64'(digit);
      check(1, s2,  c2,
            64'(acc_s) + carry_val(36'(acc_c), 1, 32, 0) + base);
      check(2, s4,  36'(c4),
            64'(acc_s) + carry_val(36'(acc_c[15:0]), 2, 16, 0) + base + 64'(f_in));
      check(4, s16, 36'(c16),
            64'(acc_s) + carry_val(36'(acc_c[7:0]), 4, 8, 0) + base);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
