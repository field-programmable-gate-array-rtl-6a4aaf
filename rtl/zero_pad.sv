// zero_pad: inserts the null subcarriers and forms the transform input.
//
// The 12 QPSK symbols of one OFDM symbol are collected in arrival order; the
// k-th symbol goes to subcarrier N_LEAD + k, so subcarriers 0, 1, 14 and 15
// are zero, as in the described design (two zeros at the start and two at
// the end). When the last symbol of a frame arrives, the whole I vector
// leaves on the next clock and the Q vector exactly SYM_CLKS clocks later:
// the I and Q parts share one transform, one after the other, like the
// original where the Q taps are delayed one symbol period more than the I
// taps. Between vectors the data output is forced to zero, as the original
// resets its multiplexers with a zero constant. The per-tap delay lines of
// the original are replaced here by a symbol shift register, which gives the
// same alignment.
//
// Interface: symbols in on sym_valid (at most one per clock; at the design
// rate one per SYM_CLKS clocks). Output is a vbeat_t: valid for one clock per
// vector, is_q marks the Q vector. A frame must not complete while its
// predecessor's Q vector is still pending (frames at least SYM_CLKS + 1
// clocks apart; at the design rate they are 192 clocks apart).
module zero_pad
  import mwofdm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sym_valid,
  input  sample_t sym_i,
  input  sample_t sym_q,
  output vbeat_t  vout
);

  sample_t [N_C-2:0] shi, shq;      // earlier symbols of the frame, newest at the top
  logic [$clog2(N_C)-1:0] cnt;      // symbols taken in this frame
  svec_t   qvec;                    // Q vector waiting for its slot
  logic    q_pend;
  logic [$clog2(SYM_CLKS)-1:0] qwait;

  // Vector with the N_C symbols on subcarriers N_LEAD .. N_LEAD+N_C-1.
  function automatic svec_t place(input sample_t [N_C-1:0] s);
    svec_t v;
    v = '0;
    for (int k = 0; k < N_C; k++) v[N_LEAD + k] = s[k];
    return v;
  endfunction

  sample_t [N_C-1:0] nxt_i, nxt_q;
  always_comb begin
    nxt_i = {sym_i, shi};
    nxt_q = {sym_q, shq};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shi    <= '0;
      shq    <= '0;
      cnt    <= '0;
      qvec   <= '0;
      q_pend <= 1'b0;
      qwait  <= '0;
      vout   <= '0;
    end else begin
      vout <= '0;
      if (q_pend) begin
        if (qwait == $bits(qwait)'(SYM_CLKS - 1)) begin
          q_pend    <= 1'b0;
          vout.valid <= 1'b1;
          vout.is_q  <= 1'b1;
          vout.data  <= qvec;
        end
        qwait <= qwait + 1'b1;
      end
      if (sym_valid) begin
        shi <= nxt_i[N_C-1:1];
        shq <= nxt_q[N_C-1:1];
        if (cnt == $bits(cnt)'(N_C - 1)) begin
          cnt        <= '0;
          vout.valid <= 1'b1;
          vout.is_q  <= 1'b0;
          vout.data  <= place(nxt_i);
          qvec       <= place(nxt_q);
          q_pend     <= 1'b1;
          qwait      <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // A new frame may not overwrite a Q vector that has not left yet.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (sym_valid && cnt == $bits(cnt)'(N_C - 1)) |-> !q_pend);

endmodule
