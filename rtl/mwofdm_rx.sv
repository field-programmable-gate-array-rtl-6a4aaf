// mwofdm_rx: multiwavelet OFDM receiver.
//
// Chain: sp_converter (serial I and Q to the I vector, then the Q vector) ->
// dmwcst (16-point forward multiwavelet transform) -> remove_zeros (drop
// subcarriers 0, 1, 14, 15, re-align I and Q) -> qpsk_demapper (hard
// decision against 0 and P/S to bits). The chain is the described receiver,
// the inverse of mwofdm_tx in reverse order; the stream handshakes between
// stages are this design's own.
//
// Interface: 16 (I, Q) sample pairs per OFDM symbol on chan_i/chan_q with
// chan_valid high, as produced by mwofdm_tx. The 24 recovered bits leave on
// rx_bit with rx_bit_valid, one every BIT_CLKS = 8 clocks, MSB of each QPSK
// symbol first. Timing: the first bit of a frame is on rx_bit 40 clock edges
// after the edge that takes the frame's first sample pair (31 until the S/P
// holds the Q vector, 5 through the transform, 2 to remove the zeros and 2 to
// demap), the others follow BIT_CLKS clocks apart. Frames must be
// N_C*SYM_CLKS = 192 clocks apart, the rate mwofdm_tx produces.
module mwofdm_rx
  import mwofdm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t chan_i,
  input  sample_t chan_q,
  input  logic    chan_valid,
  output logic    rx_bit,
  output logic    rx_bit_valid
);

  vbeat_t  parallel, xformed;
  logic    sym_valid;
  sample_t sym_i, sym_q;

  sp_converter  u_sp   (.clk, .rst_n, .in_i(chan_i), .in_q(chan_q), .in_valid(chan_valid),
                        .vout(parallel));
  dmwcst        u_dwt  (.clk, .rst_n, .vin(parallel), .vout(xformed));
  remove_zeros  u_rz   (.clk, .rst_n, .vin(xformed), .sym_valid, .sym_i, .sym_q);
  qpsk_demapper u_dem  (.clk, .rst_n, .sym_valid, .sym_i, .sym_q,
                        .bit_out(rx_bit), .bit_valid(rx_bit_valid));

endmodule
