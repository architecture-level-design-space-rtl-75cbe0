// End-to-end testbench of the radix-16 sequential multiplier at its default
// parameters (N = 32, radix-16 reduction CSAs, carry look-ahead final
// adder).
//
// Runs corner-case and random multiplications and compares every product
// with x*y computed in the testbench. Each operation must take exactly
// N/4+1 = 9 clock edges after the edge that accepted start, when done
// is high and the product valid. It also exercises and counts
// the behaviours the design has: back-to-back operations (start in the cycle
// done is high), start and operand changes while busy (must be ignored),
// a sparse carry left in the Carry register for the final adder, and a
// final addition whose carries propagate across a group boundary. A
// behaviour that never happened counts as a failure.
module tb_radix16_seq_mult;

  localparam int N  = 32;
  localparam int ND = N / 4;

  int checks = 0;
  int failures = 0;

  logic           clk = 0, rst_n = 0, start = 0;
  logic [N-1:0]   x = '0, y = '0;
  logic           busy, done;
  logic [2*N-1:0] product;

  radix16_seq_mult u_dut (.clk, .rst_n, .start, .x, .y, .busy, .done, .product);

  always #5 clk = ~clk;

  int n_back_to_back = 0, n_ignored_start = 0, n_carry_at_final = 0, n_final_ripple = 0;

  // observe the redundant upper half entering the final adder
  always @(posedge clk) begin
    if (u_dut.finish) begin
      if (u_dut.car_q != '0) n_carry_at_final++;
      // a carry that ripples out of a 4-bit group in the final addition
      if (((u_dut.sum_q ^ u_dut.car_full) & ~u_dut.hi_sum & 32'hEEEE_EEEE) != '0 &&
          u_dut.car_q != '0) n_final_ripple++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // start one operation now (caller is at #1 after an edge, dut idle or
  // finishing), disturb inputs while busy, wait for done, check
  task automatic run_op(logic [N-1:0] a, logic [N-1:0] b, bit disturb);
    int cyc;
    logic [2*N-1:0] expect_p;
    expect_p = (2*N)'(a) * (2*N)'(b);
    x = a; y = b; start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 0;   // clock edges after the edge that accepted start
    if (disturb) begin
      // new operands and another start while busy must not disturb anything
      x = ~a; y = ~b; start = 1;
      @(posedge clk); #1;
      if (busy) n_ignored_start++;
      start = 0;
      cyc++;
    end
    while (!done) begin
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (cyc != ND + 1) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cyc, ND + 1);
    end
    checks++;
    if (product !== expect_p) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", a, b, product, expect_p);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run_op('0, '0, 0);
    run_op('1, '1, 0);
    run_op('1, 1, 0);
    run_op(1, '1, 0);
    run_op(32'h8000_0000, 32'h8000_0000, 1);
    run_op(32'hFFFF_0000, 32'h0000_FFFF, 0);
    run_op(32'h1234_5678, 32'h9ABC_DEF0, 1);
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] a, b;
      a = $urandom; b = $urandom;
      if (t % 7 == 0) a = a | 32'hF0F0_F0F0;
      // every third operation starts in the cycle done is high
      if (t % 3 == 0) begin
        n_back_to_back++;
      end else begin
        repeat (t % 4) @(posedge clk);
        #0;
      end
      run_op(a, b, (t % 5) == 0);
    end
    checks += 4;
    if (n_back_to_back == 0)   begin failures++; $display("FAIL never back to back"); end
    if (n_ignored_start == 0)  begin failures++; $display("FAIL never ignored a start"); end
    if (n_carry_at_final == 0) begin failures++; $display("FAIL never a carry at the final adder"); end
    if (n_final_ripple == 0)   begin failures++; $display("FAIL never a rippling final carry"); end
    $display("back_to_back=%0d ignored_start=%0d carry_at_final=%0d final_ripple=%0d",
             n_back_to_back, n_ignored_start, n_carry_at_final, n_final_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
