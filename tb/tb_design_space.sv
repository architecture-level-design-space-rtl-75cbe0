// Design-space testbench: all 45 configurations of the radix-16 sequential
// multiplier (N = 32, 64, 128; reduction CSA radix 2, 4, 16; final adder
// KS, SK, BK, CLA, CSL) multiply the same random operands side by side.
//
// Every instance's product is compared with x*y (low N bits of shared
// 128-bit operands) computed in the testbench, and its latency with N/4+1
// clock edges after the start edge (9, 17, 33 cycles). Counted per radix:
// operations where the early-output carry flip-flop F was set (radix 2 and
// 4 only) and where the sparse Carry register was non-zero at the final
// addition; either never happening is a failure.
module tb_design_space;
  import r16_mult_pkg::*;

  localparam int NCFG = 45;
  localparam int OPS  = 2000;

  int checks = 0;
  int failures = 0;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] x = '0, y = '0;

  int  err_cnt  [NCFG];
  int  lat_err  [NCFG];
  int  ok_cnt   [NCFG];
  int  f_seen   [NCFG];
  int  c_seen   [NCFG];
  logic [NCFG-1:0] busy_v;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    localparam int     NW  = (i / 15 == 0) ? 32 : (i / 15 == 1) ? 64 : 128;
    localparam int     RX  = ((i / 5) % 3 == 0) ? 2 : ((i / 5) % 3 == 1) ? 4 : 16;
    localparam adder_e ARC = adder_e'(i % 5);

    logic            busy, done;
    logic [2*NW-1:0] product, expect_p;
    int              cyc;

    radix16_seq_mult #(.N(NW), .PPR_RADIX(RX), .FINAL_ADDER(ARC)) u_dut (
      .clk, .rst_n, .start, .x(x[NW-1:0]), .y(y[NW-1:0]), .busy, .done, .product
    );

    assign busy_v[i] = busy;

    always @(posedge clk) begin
      if (start && !busy) begin
        expect_p <= (2*NW)'(x[NW-1:0]) * (2*NW)'(y[NW-1:0]);
        cyc      <= 0;
      end else begin
        cyc <= cyc + 1;
      end
      if (u_dut.iterate && u_dut.f_q) f_seen[i]++;
      if (u_dut.finish && u_dut.car_q != '0) c_seen[i]++;
      if (rst_n && done) begin
        // cyc: edges after the start edge up to the one that raised done
        if (cyc != NW / 4 + 1) lat_err[i]++;
        if (product !== expect_p) begin
          err_cnt[i]++;
          $display("FAIL cfg %0d (N=%0d radix=%0d adder=%0d)", i, NW, RX, i % 5);
        end else ok_cnt[i]++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NCFG; i++) begin
      err_cnt[i] = 0; lat_err[i] = 0; ok_cnt[i] = 0; f_seen[i] = 0; c_seen[i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int t = 0; t < OPS; t++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) begin x = '1; y = '1; end
      if (t == 1) begin x = '0; y = '1; end
      start = 1;
      @(posedge clk); #1;
      start = 0;
      while (busy_v != '0) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    for (int i = 0; i < NCFG; i++) begin
      checks += 3;
      if (err_cnt[i] != 0 || ok_cnt[i] != OPS) begin
        failures++;
        $display("FAIL cfg %0d: %0d right of %0d", i, ok_cnt[i], OPS);
      end
      if (lat_err[i] != 0) begin failures++; $display("FAIL cfg %0d latency", i); end
      // F exists for radix 2 and 4 only; sparse carries at the end for all
      if ((((i / 5) % 3) != 2 && f_seen[i] == 0) || c_seen[i] == 0) begin
        failures++;
        $display("FAIL cfg %0d: F set %0d times, carry at final %0d times", i, f_seen[i], c_seen[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
