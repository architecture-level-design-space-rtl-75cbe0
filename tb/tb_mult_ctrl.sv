// Self-checking testbench of the multiplier sequencer (mult_ctrl).
//
// For N = 32 (default) and N = 128, starts operations (some back to back,
// some with start held high while busy) and checks cycle by cycle: load only
// in the start cycle, exactly N/4 iterate cycles, then one finish cycle,
// done exactly N/4+1 cycles after start, and no restart while busy.
module tb_mult_ctrl;

  int checks = 0;
  int failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic ld_a, it_a, fi_a, bz_a, dn_a;
  logic ld_b, it_b, fi_b, bz_b, dn_b;

  mult_ctrl           ua (.clk, .rst_n, .start, .load(ld_a), .iterate(it_a), .finish(fi_a), .busy(bz_a), .done(dn_a));
  mult_ctrl #(.N(128)) ub (.clk, .rst_n, .start, .load(ld_b), .iterate(it_b), .finish(fi_b), .busy(bz_b), .done(dn_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected sequence for one operation with ND digits, started now
  task automatic run_op(int nd, bit hold_start, bit which);
    int n_it;
    logic ld, it, fi, bz, dn;
    start = 1;
    #1;
    ld = which ? ld_b : ld_a;
    checks++;
    if (!ld) begin failures++; $display("FAIL no load on start"); end
    @(posedge clk); #1;
    if (!hold_start) start = 0;
    n_it = 0;
    for (int cyc = 1; cyc <= nd + 1; cyc++) begin
      ld = which ? ld_b : ld_a; it = which ? it_b : it_a; fi = which ? fi_b : fi_a;
      bz = which ? bz_b : bz_a; dn = which ? dn_b : dn_a;
      checks++;
      if (ld || !bz || dn) begin failures++; $display("FAIL cycle %0d: load/busy/done", cyc); end
      if (cyc <= nd) begin
        checks++;
        if (!it || fi) begin failures++; $display("FAIL cycle %0d: expected iterate", cyc); end
      end else begin
        checks++;
        if (it || !fi) begin failures++; $display("FAIL cycle %0d: expected finish", cyc); end
      end
      @(posedge clk); #1;
    end
    start = 0;
    #1;
    dn = which ? dn_b : dn_a; bz = which ? bz_b : bz_a;
    checks++;
    if (!dn || bz) begin failures++; $display("FAIL done not at cycle %0d", nd + 1); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // both instances see the same start; follow the short one first
    run_op(8, 1'b0, 1'b0);
    // wait for the long one to come back, then run it alone with start held
    while (bz_b) begin @(posedge clk); #1; end
    repeat (2) @(posedge clk); #1;
    run_op(32, 1'b1, 1'b1);
    repeat (3) @(posedge clk); #1;
    while (bz_a || bz_b) begin @(posedge clk); #1; end
    run_op(8, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
