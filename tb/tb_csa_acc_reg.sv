// Self-checking testbench of the Sum/Carry/F registers (csa_acc_reg).
//
// Instances for radix 2, 4 and 16 (N = 32) are driven with random
// reduction results and random clear/shift controls. A reference model in
// the testbench keeps the expected register contents, computed from bit
// weights: the new Sum is the sum vector without its low 4 bits, and new
// Carry bit j is the input carry of weight 2^(g*j + 4). Checked after every
// clock edge.
module tb_csa_acc_reg;

  int checks = 0;
  int failures = 0;

  logic        clk = 0, rst_n = 0, clear = 0, shift = 0, f_next = 0;
  logic [35:0] red_s = '0;
  logic [35:0] red_c = '0;   // low W/g bits used per radix

  logic [31:0] s2, s4, s16;
  logic [31:0] c2;
  logic [15:0] c4;
  logic [7:0]  c16;
  logic        f2, f4, f16;

  csa_acc_reg #(.N(32), .RADIX(2)) u2  (.clk, .rst_n, .clear, .shift, .red_s, .red_c(red_c),
                                        .f_next, .sum_q(s2), .car_q(c2), .f_q(f2));
  csa_acc_reg #(.N(32), .RADIX(4)) u4  (.clk, .rst_n, .clear, .shift, .red_s, .red_c(red_c[17:0]),
                                        .f_next, .sum_q(s4), .car_q(c4), .f_q(f4));
  csa_acc_reg                      u16 (.clk, .rst_n, .clear, .shift, .red_s, .red_c(red_c[8:0]),
                                        .f_next, .sum_q(s16), .car_q(c16), .f_q(f16));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected carry register: bit j takes the input carry whose weight is
  // 2^(g*j+4); input carry i has weight 2^(g*(i+1))
  function automatic logic [31:0] exp_car(int g, logic [35:0] c);
    logic [31:0] r = '0;
    for (int j = 0; j < 32 / g; j++) r[j] = c[(g*j + 4) / g - 1];
    return r;
  endfunction

  logic [31:0] es, ec2, ec4, ec16;
  logic        ef;

  initial begin
    es = '0; ec2 = '0; ec4 = '0; ec16 = '0; ef = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      red_s  = {$urandom, $urandom};
      red_c  = {$urandom, $urandom};
      f_next = 1'($urandom);
      clear  = ($urandom % 8) == 0;
      shift  = ($urandom % 4) != 0;
      @(posedge clk);
      if (clear) begin
        es = '0; ec2 = '0; ec4 = '0; ec16 = '0; ef = 0;
      end else if (shift) begin
        es   = red_s[35:4];
        ec2  = exp_car(1, red_c);
        ec4  = exp_car(2, red_c);
        ec16 = exp_car(4, red_c);
        ef   = f_next;
      end
      #1;
      checks += 3;
      if (s2 !== es || c2 !== ec2 || f2 !== ef) begin failures++; $display("FAIL radix 2 t=%0d", t); end
      if (s4 !== es || c4 !== ec4[15:0] || f4 !== ef) begin failures++; $display("FAIL radix 4 t=%0d", t); end
      if (s16 !== es || c16 !== ec16[7:0] || f16 !== ef) begin failures++; $display("FAIL radix 16 t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
