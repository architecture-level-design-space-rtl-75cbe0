// Self-checking testbench of the KS final adder (adder_ks).
//
// Four instances (N = 32, 64, 128 and an irregular 13) are driven with
// random operands, with operands that make a carry ripple through every
// position, and with all-zero / all-one corners, carry-in 0 and 1. Each
// result is compared with a + b + cin computed one bit wider in the
// testbench. Purely combinational: one check per instance per vector.
module tb_adder_ks;

  int checks = 0;
  int failures = 0;

  logic [127:0] a, b;
  logic         cin;

  logic [31:0]  s32;  logic c32;
  logic [63:0]  s64;  logic c64;
  logic [127:0] s128; logic c128;
  logic [12:0]  s13;  logic c13;

  adder_ks #(.N(32))  u32  (.a(a[31:0]), .b(b[31:0]), .cin, .sum(s32),  .cout(c32));
  adder_ks #(.N(64))  u64  (.a(a[63:0]), .b(b[63:0]), .cin, .sum(s64),  .cout(c64));
  adder_ks            u_def (.a(a[31:0]), .b(b[31:0]), .cin, .sum(), .cout());
  adder_ks #(.N(128)) u128 (.a(a),       .b(b),       .cin, .sum(s128), .cout(c128));
  adder_ks #(.N(13))  u13  (.a(a[12:0]), .b(b[12:0]), .cin, .sum(s13),  .cout(c13));

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check_one();
    logic [128:0] e128;
    logic [64:0]  e64;
    logic [32:0]  e32;
    logic [13:0]  e13;
    #1;
    e128 = {1'b0, a} + {1'b0, b} + 129'(cin);
    e64  = {1'b0, a[63:0]} + {1'b0, b[63:0]} + 65'(cin);
    e32  = {1'b0, a[31:0]} + {1'b0, b[31:0]} + 33'(cin);
    e13  = {1'b0, a[12:0]} + {1'b0, b[12:0]} + 14'(cin);
    checks += 4;
    if ({c128, s128} !== e128) begin failures++; $display("FAIL N=128 a=%h b=%h cin=%b", a, b, cin); end
    if ({c64, s64}   !== e64)  begin failures++; $display("FAIL N=64 a=%h b=%h cin=%b", a[63:0], b[63:0], cin); end
    if ({c32, s32}   !== e32)  begin failures++; $display("FAIL N=32 a=%h b=%h cin=%b", a[31:0], b[31:0], cin); end
    if ({c13, s13}   !== e13)  begin failures++; $display("FAIL N=13 a=%h b=%h cin=%b", a[12:0], b[12:0], cin); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corners
    a = '0; b = '0; cin = 0; check_one();
    a = '1; b = '0; cin = 1; check_one();
    a = '1; b = '1; cin = 1; check_one();
    a = '1; b = '1; cin = 0; check_one();
    // a long ripple starting at every position
    for (int i = 0; i < 128; i++) begin
      a = '1 << i; b = ~('1 << i) | (128'(1) << i); cin = 0; check_one();
      a = ~(128'(1) << i); b = '0; cin = 1; check_one();
    end
    // random operands
    for (int t = 0; t < 2000; t++) begin
      a = rand128(); b = rand128(); cin = 1'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
