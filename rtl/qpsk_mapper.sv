// qpsk_mapper: serial-to-parallel conversion of the bit stream and QPSK
// mapping.
//
// Two consecutive bits form one QPSK symbol, the first bit received being the
// most significant. The most significant bit chooses the I value and the
// least significant bit the Q value: 0 maps to -0.70703125 and 1 to
// +0.70703125 (AMP in DATA_FRAC fraction bits). This follows the described
// slice-and-multiplexer mapper; which level goes with bit value 0 is this
// design's reading of the multiplexer inputs.
//
// Interface: one bit is taken on each clock with bit_valid high. sym_valid
// pulses for one clock, one clock after the second bit of a pair, with sym_i
// and sym_q held until the next symbol. At the design's rate a bit arrives
// every BIT_CLKS clocks, so symbols leave at half the bit rate.
module qpsk_mapper
  import mwofdm_pkg::*;
#(
  parameter int AMP = QPSK_AMP
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    bit_in,
  input  logic    bit_valid,
  output logic    sym_valid,
  output sample_t sym_i,
  output sample_t sym_q
);

  logic msb;        // first bit of the pair
  logic have_msb;   // the first bit has been taken

  function automatic sample_t level(input logic b);
    return b ? sample_t'(AMP) : sample_t'(-AMP);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msb       <= 1'b0;
      have_msb  <= 1'b0;
      sym_valid <= 1'b0;
      sym_i     <= '0;
      sym_q     <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (bit_valid) begin
        if (!have_msb) begin
          msb      <= bit_in;
          have_msb <= 1'b1;
        end else begin
          have_msb  <= 1'b0;
          sym_valid <= 1'b1;
          sym_i     <= level(msb);
          sym_q     <= level(bit_in);
        end
      end
    end
  end

endmodule
