// Self-checking testbench of the final adder wrapper (final_adder).
//
// One instance per architecture (KS, SK, BK, CLA = default, CSL) at N = 64
// gets the same random and corner operands; every result is compared with
// a + b + cin computed one bit wider in the testbench.
module tb_final_adder;
  import r16_mult_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [63:0]      a, b;
  logic             cin;
  logic [4:0][63:0] s;
  logic [4:0]       co;
  logic [31:0]      sd;
  logic             cd;

  final_adder #(.N(64), .ARCH(ADD_KS))  u_ks  (.a, .b, .cin, .sum(s[0]), .cout(co[0]));
  final_adder #(.N(64), .ARCH(ADD_SK))  u_sk  (.a, .b, .cin, .sum(s[1]), .cout(co[1]));
  final_adder #(.N(64), .ARCH(ADD_BK))  u_bk  (.a, .b, .cin, .sum(s[2]), .cout(co[2]));
  final_adder #(.N(64), .ARCH(ADD_CLA)) u_cla (.a, .b, .cin, .sum(s[3]), .cout(co[3]));
  final_adder #(.N(64), .ARCH(ADD_CSL)) u_csl (.a, .b, .cin, .sum(s[4]), .cout(co[4]));
  final_adder                           u_def (.a(a[31:0]), .b(b[31:0]), .cin, .sum(sd), .cout(cd));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [64:0] e;
      logic [32:0] ed;
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; cin = 1'($urandom);
      if (t < 64) begin a = ~(64'(1) << t); b = 64'(1) << t; cin = 1'(t); end
      #1;
      e  = {1'b0, a} + {1'b0, b} + 65'(cin);
      ed = {1'b0, a[31:0]} + {1'b0, b[31:0]} + 33'(cin);
      for (int k = 0; k < 5; k++) begin
        checks++;
        if ({co[k], s[k]} !== e) begin failures++; $display("FAIL arch %0d a=%h b=%h", k, a, b); end
      end
      checks++;
      if ({cd, sd} !== ed) begin failures++; $display("FAIL default a=%h b=%h", a[31:0], b[31:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
