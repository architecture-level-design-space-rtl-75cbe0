// Sequencer of the radix-16 sequential multiplier.
//
// IDLE -> (start) -> N/4 reduction cycles, one multiplier digit each ->
// one final-addition cycle -> IDLE. With start seen at clock edge 0, the
// digits are accumulated at edges 1..N/4, the final adder result is
// captured at edge N/4+1 and done is high for the cycle after it, so a
// product takes N/4+1 cycles (9 for N = 32, as the document states).
// load is asserted in the cycle start is accepted, iterate during the
// reduction cycles and finish during the final-addition cycle; busy covers
// both. start is ignored while busy. The state encoding and this
// start/done handshake are this design's own choice.
module mult_ctrl #(
  parameter int N   = 32,
  localparam int ND = N / 4,
  localparam int CW = $clog2(ND + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic load,
  output logic iterate,
  output logic finish,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_FINAL} state_e;

  state_e        state;
  logic [CW-1:0] count;    // digits still to accumulate

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      count <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_ITER;
          count <= CW'(ND);
        end
        S_ITER: begin
          count <= count - 1'b1;
          if (count == CW'(1)) state <= S_FINAL;
        end
        S_FINAL: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign load    = (state == S_IDLE) && start;
  assign iterate = (state == S_ITER);
  assign finish  = (state == S_FINAL);
  assign busy    = (state != S_IDLE);

  initial begin
    assert (N % 4 == 0 && N >= 4) else $error("mult_ctrl: N must be a positive multiple of 4");
  end

endmodule
