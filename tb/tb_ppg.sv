// Self-checking testbench of the partial product generator (ppg).
//
// For random multiplicands (plus all-ones) and every 4-bit digit, checks
// each component against Y[i+k] ? X*2^k : 0 and the sum of the four
// components against digit*X, for N = 32 (default) and N = 128.
module tb_ppg;

  int checks = 0;
  int failures = 0;

  logic [127:0]      x;
  logic [3:0]        digit;
  logic [3:0][35:0]  pp32;
  logic [3:0][131:0] pp128;

  ppg           u32  (.x(x[31:0]), .digit, .pp(pp32));
  ppg #(.N(128)) u128 (.x(x),       .digit, .pp(pp128));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic [131:0] tot128, exp128;
    logic [35:0]  tot32, exp32;
    #1;
    tot128 = '0; tot32 = '0;
    for (int k = 0; k < 4; k++) begin
      exp128 = digit[k] ? {4'b0, x} * (132'(1) << k) : '0;
      exp32  = digit[k] ? {4'b0, x[31:0]} * (36'(1) << k) : '0;
      checks += 2;
      if (pp128[k] !== exp128) begin failures++; $display("FAIL N=128 k=%0d digit=%h", k, digit); end
      if (pp32[k]  !== exp32)  begin failures++; $display("FAIL N=32 k=%0d digit=%h", k, digit); end
      tot128 += pp128[k];
      tot32  += pp32[k];
    end
    checks += 2;
    if (tot128 !== 132'(x) * 132'(digit)) begin failures++; $display("FAIL sum N=128 digit=%h", digit); end
    if (tot32 !== 36'(x[31:0]) * 36'(digit)) begin failures++; $display("FAIL sum N=32 digit=%h", digit); end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      x = (t == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
      for (int d = 0; d < 16; d++) begin
        digit = 4'(d);
        check_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
