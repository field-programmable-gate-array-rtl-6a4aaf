// qpsk_demapper: hard-decision QPSK demapping and parallel-to-serial
// conversion.
//
// Each (I, Q) pair is compared with the threshold 0: a value above zero
// decides 1, anything else 0. The two decisions form a 2-bit symbol, I as the
// most significant bit, which then leaves as two serial bits, MSB first, one
// every BIT_CLKS clocks. Threshold, concatenation order and P/S follow the
// described block; the registered comparators stand for its one-clock
// relational blocks. The exact output timing is this design's choice.
//
// Interface and timing: with sym_valid at clock t, the MSB is on bit_out with
// bit_valid high at t + 2 and the LSB at t + 2 + BIT_CLKS. Symbols must be at
// least 2*BIT_CLKS clocks apart (the design rate is exactly that).
module qpsk_demapper
  import mwofdm_pkg::*;
#(
  parameter int BIT_GAP = BIT_CLKS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sym_valid,
  input  sample_t sym_i,
  input  sample_t sym_q,
  output logic    bit_out,
  output logic    bit_valid
);

  logic [1:0] sym2;                  // {I decision, Q decision}
  logic       busy;
  logic [$clog2(2 * BIT_GAP)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym2      <= '0;
      busy      <= 1'b0;
      cnt       <= '0;
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (busy) begin
        if (cnt == '0) begin
          bit_out   <= sym2[1];
          bit_valid <= 1'b1;
        end else if (cnt == $bits(cnt)'(BIT_GAP)) begin
          bit_out   <= sym2[0];
          bit_valid <= 1'b1;
          busy      <= 1'b0;
        end
        cnt <= cnt + 1'b1;
      end
      if (sym_valid) begin
        sym2 <= {sym_i > 0, sym_q > 0};
        busy <= 1'b1;
        cnt  <= '0;
      end
    end
  end

endmodule
