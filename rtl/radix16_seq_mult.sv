// Radix-16 sequential multiplier: unsigned N x N -> 2N bits, one 4-bit
// multiplier digit per clock cycle.
//
// Every cycle the PPG forms the four components Y[i+k]*(2^k X) of the
// current digit's partial product, and the PPR tree adds them into the
// accumulated partial product, which is kept in carry-save form in the Sum
// and Carry registers. The four lowest bits of the result are final; they
// pass through the early output adder into the lower half of the product
// register, and the rest is fed back shifted right by 4 bits. After N/4
// such cycles one carry-propagate addition (the final adder) turns the
// redundant upper half into binary.
//
// Design space (parameters):
//   N           operand width; the document studies 32, 64 and 128.
//   PPR_RADIX   2, 4 or 16: group width of the reduction CSAs. The Carry
//               register holds N/1, N/2 or N/4 bits accordingly, and the
//               early output adder is 4 bits wide, 2 bits wide, or absent.
//   FINAL_ADDER KS, SK, BK, CLA or CSL.
// The defaults (radix-16 CSAs, CLA final adder) are the configuration the
// document singles out; the default width of 32 is one of its three sizes.
//
// Interface: pulse start with x and y valid while busy is low. busy rises on
// the next edge; N/4+1 clock edges after the edge that accepted start, done
// is high for one cycle and product holds x*y until the next start.
// Asynchronous active-low reset. The handshake, reset, the multiplicand
// register, the registered final addition and the place where F re-enters
// for radix 4 are this design's choices; the datapath structure follows the
// document.
module radix16_seq_mult
  import r16_mult_pkg::*;
#(
  parameter int     N           = 32,
  parameter int     PPR_RADIX   = 16,
  parameter adder_e FINAL_ADDER = ADD_CLA,
  localparam int    W           = N + 4,
  localparam int    G           = radix_bits(PPR_RADIX),
  localparam int    NG          = W / G,
  localparam int    NC          = N / G
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product
);

  // ---------------------------------------------------------------- control
  logic load, iterate, finish;
  mult_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .load, .iterate, .finish, .busy, .done
  );

  // -------------------------------------------------------------- registers
  logic [N-1:0]  x_q;        // multiplicand X
  logic [3:0]    digit;      // current multiplier digit Y[i+3:i]
  logic [N-1:0]  sum_q;      // Sum register (upper part, already shifted)
  logic [NC-1:0] car_q;      // Carry register, bit j of weight 2^(G*j)
  logic          f_q;        // early output adder carry flip-flop F

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    x_q <= '0;
    else if (load) x_q <= x;
  end

  mplier_reg #(.N(N)) u_yreg (
    .clk, .rst_n, .load, .shift(iterate), .y, .digit
  );

  // ---------------------------------------------------------------- datapath
  logic [3:0][W-1:0] pp;
  ppg #(.N(N)) u_ppg (.x(x_q), .digit, .pp);

  logic [W-1:0]  red_s;
  logic [NG-1:0] red_c;
  ppr_tree #(.N(N), .RADIX(PPR_RADIX)) u_ppr (
    .pp, .acc_s(sum_q), .acc_c(car_q), .f_in(f_q), .s_out(red_s), .c_out(red_c)
  );

  // carries of weight 2^1..2^3 for the early output adder
  logic [3:1] c_lo;
  always_comb begin
    for (int w = 1; w <= 3; w++) begin
      c_lo[w] = ((w % G) == 0) ? red_c[(w / G) - 1] : 1'b0;
    end
  end

  logic [3:0] p_lo;
  logic       f_next;
  early_out_adder #(.RADIX(PPR_RADIX)) u_early (
    .s_lo(red_s[3:0]), .c_lo, .cin(f_q), .p_lo, .cout(f_next)
  );

  csa_acc_reg #(.N(N), .RADIX(PPR_RADIX)) u_acc (
    .clk, .rst_n, .clear(load), .shift(iterate), .red_s, .red_c, .f_next,
    .sum_q, .car_q, .f_q
  );

  // final adder: sum vector + sparse carries (zeros between) + F
  logic [N-1:0] car_full, hi_sum;
  logic         hi_cout;
  always_comb begin
    car_full = '0;
    for (int j = 0; j < NC; j++) car_full[G*j] = car_q[j];
  end

  final_adder #(.N(N), .ARCH(FINAL_ADDER)) u_fadd (
    .a(sum_q), .b(car_full), .cin(f_q), .sum(hi_sum), .cout(hi_cout)
  );

  product_reg #(.N(N)) u_prod (
    .clk, .rst_n, .shift_lo(iterate), .lo_bits(p_lo), .load_hi(finish), .hi_sum, .product
  );

  // The upper half of the product is below 2^N, so the final adder never
  // carries out of its top bit.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) finish |-> !hi_cout)
    else $error("final adder overflow");

  initial begin
    assert (PPR_RADIX == 2 || PPR_RADIX == 4 || PPR_RADIX == 16)
      else $error("PPR_RADIX must be 2, 4 or 16");
  end

endmodule
