// remove_zeros: removes the null subcarriers and re-aligns I and Q.
//
// The receiver transform delivers the I vector and, SYM_CLKS clocks later,
// the Q vector of an OFDM symbol. Subcarriers 0, 1, 14 and 15 are discarded
// (they carry the inserted zeros); subcarriers 2..13 of the I vector are held
// until the Q vector arrives, and then the 12 data subcarriers leave as
// (I, Q) pairs, subcarrier 2 first, one pair every SYM_CLKS clocks, so that I
// and Q reach the demapper together. This follows the described block
// (terminators on the null subcarriers, two counter-driven multiplexers with
// staggered delays); the output staging register, which lets the next frame's
// I vector arrive while the last pairs are still leaving, is this design's
// choice.
//
// Interface and timing: vin as from dmwcst. With the Q vector on vin at clock
// t, pair k (k = 0..11) is on sym_i/sym_q with sym_valid high for one clock at
// t + 2 + k*SYM_CLKS; the values are held between pulses.
module remove_zeros
  import mwofdm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  vbeat_t  vin,
  output logic    sym_valid,
  output sample_t sym_i,
  output sample_t sym_q
);

  sample_t [N_C-1:0] ibuf;          // data subcarriers of the I vector
  sample_t [N_C-1:0] oi, oq;        // frame being sent
  logic    busy;
  logic [$clog2(N_C)-1:0]      idx;
  logic [$clog2(SYM_CLKS)-1:0] tick;

  function automatic sample_t [N_C-1:0] strip(input svec_t v);
    sample_t [N_C-1:0] d;
    for (int k = 0; k < N_C; k++) d[k] = v[N_LEAD + k];
    return d;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ibuf      <= '0;
      oi        <= '0;
      oq        <= '0;
      busy      <= 1'b0;
      idx       <= '0;
      tick      <= '0;
      sym_valid <= 1'b0;
      sym_i     <= '0;
      sym_q     <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (busy) begin
        tick <= tick + 1'b1;
        if (tick == $bits(tick)'(SYM_CLKS - 1)) begin
          if (idx == $bits(idx)'(N_C - 1)) begin
            busy <= 1'b0;
            idx  <= '0;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        if (tick == '0) begin
          sym_valid <= 1'b1;
          sym_i     <= oi[idx];
          sym_q     <= oq[idx];
        end
      end
      if (vin.valid && !vin.is_q) ibuf <= strip(vin.data);
      if (vin.valid &&  vin.is_q) begin
        oi   <= ibuf;
        oq   <= strip(vin.data);
        busy <= 1'b1;
        idx  <= '0;
        tick <= '0;
      end
    end
  end

endmodule
