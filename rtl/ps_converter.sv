// ps_converter: parallel-to-serial conversion of the transmitter output.
//
// A time-division multiplexer loads each 16-sample vector and sends it out
// one sample per clock, sample 0 first. The I vector and the Q vector of an
// OFDM symbol arrive SYM_CLKS clocks apart, so the serial stream carries 16 I
// samples followed by 16 Q samples. Two multiplexers then split the stream:
// the I samples go through a SYM_CLKS-stage delay line, so they leave
// together with the Q samples, and each output is zero while the stream
// carries the other part or nothing. This follows the described structure
// (time-division multiplexer, "real" and "imaginary" multiplexers, a 16-clock
// delay on the I side). Instead of the original's free-running counter with a
// fixed offset, the multiplexers are steered by the is_q flag that travels
// with each vector, and a valid output marks the 16 clocks carrying a frame
// (this design's choice).
//
// Timing: with the I vector on vin at clock t, I sample k and Q sample k leave
// together on out_i/out_q at clock t + 2 + SYM_CLKS + k, k = 0..15, with
// out_valid high; a new vector must not arrive while one is being sent.
module ps_converter
  import mwofdm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  vbeat_t  vin,
  output sample_t out_i,
  output sample_t out_q,
  output logic    out_valid
);

  // time-division multiplexer
  svec_t   tdm_sr;
  logic [$clog2(N_F+1)-1:0] tdm_left;   // samples still to send
  logic    tdm_is_q;
  sample_t q;                           // serial stream
  logic    q_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tdm_sr   <= '0;
      tdm_left <= '0;
      tdm_is_q <= 1'b0;
    end else if (vin.valid) begin
      tdm_sr   <= vin.data;
      tdm_left <= $bits(tdm_left)'(N_F);
      tdm_is_q <= vin.is_q;
    end else if (tdm_left != 0) begin
      tdm_sr   <= {sample_t'(0), tdm_sr[N_F-1:1]};
      tdm_left <= tdm_left - 1'b1;
    end
  end

  assign q       = (tdm_left != 0) ? tdm_sr[0] : '0;
  assign q_valid = (tdm_left != 0);

  // split into I and Q; I waits SYM_CLKS clocks for its Q partner
  sample_t [SYM_CLKS-1:0] i_dly;
  sample_t mux_re, mux_im;

  always_comb begin
    mux_re = (q_valid && !tdm_is_q) ? q : '0;
    mux_im = (q_valid &&  tdm_is_q) ? q : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_dly     <= '0;
      out_i     <= '0;
      out_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      i_dly     <= {i_dly[SYM_CLKS-2:0], mux_re};
      out_i     <= i_dly[SYM_CLKS-1];
      out_q     <= mux_im;
      out_valid <= q_valid && tdm_is_q;
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    vin.valid |-> (tdm_left == 0 || tdm_left == 1));

endmodule
