// Self-checking testbench of the multiplier (Y) register (mplier_reg).
//
// Loads random values (N = 32 and N = 128) and checks that the digit output
// walks through Y[3:0], Y[7:4], ... one digit per shift, holds without
// shift, and that load wins over shift.
module tb_mplier_reg;

  int checks = 0;
  int failures = 0;

  logic         clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [127:0] y = '0;
  logic [3:0]   d32, d128;

  mplier_reg            u32  (.clk, .rst_n, .load, .shift, .y(y[31:0]), .digit(d32));
  mplier_reg #(.N(128)) u128 (.clk, .rst_n, .load, .shift, .y,          .digit(d128));

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
    for (int t = 0; t < 200; t++) begin
      int pos;
      y = {$urandom, $urandom, $urandom, $urandom};
      load = 1; shift = (t % 2 == 0);   // load has priority
      @(posedge clk); #1;
      load = 0;
      pos = 0;
      for (int c = 0; c < 40; c++) begin
        checks += 2;
        if (d32 !== ((pos < 8) ? y[4*pos +: 4] : 4'h0)) begin failures++; $display("FAIL N=32 pos %0d", pos); end
        if (d128 !== ((pos < 32) ? y[4*pos +: 4] : 4'h0)) begin failures++; $display("FAIL N=128 pos %0d", pos); end
        shift = ($urandom % 3) != 0;
        @(posedge clk); #1;
        if (shift) pos++;
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
