// sp_converter: serial-to-parallel conversion of the received samples.
//
// The channel carries I and Q samples side by side for SYM_CLKS = 16 clocks
// per OFDM symbol, marked by in_valid. One multiplexer passes the I samples
// for the first 16 clocks and then, for the next 16 clocks, the Q samples,
// which have been held back by a 16-stage delay line; a time-division
// demultiplexer (a shift register) turns each group of 16 serial samples
// into one vector. This follows the described structure. The multiplexer is
// steered by a counter started by the first valid sample rather than by a
// free-running counter with a fixed offset (this design's choice).
//
// Interface and timing: if the first sample of a frame is on the inputs at
// clock t0, the I vector (element k = sample k) leaves on vout at clock
// t0 + 16 and the Q vector at t0 + 32, each valid for one clock, is_q marking
// the Q vector. Frames must be at least 32 clocks apart.
module sp_converter
  import mwofdm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t in_i,
  input  sample_t in_q,
  input  logic    in_valid,
  output vbeat_t  vout
);

  localparam int PW = $clog2(2 * SYM_CLKS);

  sample_t [SYM_CLKS-1:0] q_dly;    // Q delay line, oldest at the top
  sample_t [N_F-2:0] tdd_sr;        // demultiplexer shift register, newest at the top
  logic    active;
  logic [PW-1:0] pos;               // position within the 32-clock window

  logic [PW-1:0] pos_now;
  logic    in_frame;
  sample_t mux_d;
  svec_t   tdd_next;

  always_comb begin
    in_frame = active || in_valid;
    pos_now  = active ? pos : '0;
    if (!in_frame)
      mux_d = '0;
    else if (pos_now < PW'(SYM_CLKS))
      mux_d = in_i;
    else
      mux_d = q_dly[SYM_CLKS-1];
    tdd_next = {mux_d, tdd_sr};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_dly  <= '0;
      tdd_sr <= '0;
      active <= 1'b0;
      pos    <= '0;
      vout   <= '0;
    end else begin
      q_dly  <= {q_dly[SYM_CLKS-2:0], in_q};
      tdd_sr <= tdd_next[N_F-1:1];
      vout   <= '0;
      if (in_frame) begin
        if (pos_now == PW'(2 * SYM_CLKS - 1)) begin
          active <= 1'b0;
          pos    <= '0;
        end else begin
          active <= 1'b1;
          pos    <= pos_now + 1'b1;
        end
        if (pos_now == PW'(SYM_CLKS - 1) || pos_now == PW'(2 * SYM_CLKS - 1)) begin
          vout.valid <= 1'b1;
          vout.is_q  <= (pos_now == PW'(2 * SYM_CLKS - 1));
          vout.data  <= tdd_next;
        end
      end
    end
  end

endmodule
