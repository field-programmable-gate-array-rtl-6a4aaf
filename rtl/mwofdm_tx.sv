// mwofdm_tx: multiwavelet OFDM transmitter.
//
// Chain: qpsk_mapper (S/P and QPSK mapping) -> zero_pad (null subcarriers
// 0, 1, 14, 15) -> idmwcst (16-point inverse multiwavelet transform, taking
// the I vector and then the Q vector of each OFDM symbol) -> ps_converter
// (serial I and Q output, sent side by side). The chain is the described
// transmitter; the stream handshakes between stages are this design's own.
//
// Interface: one bit on tx_bit with tx_bit_valid every BIT_CLKS = 8 clocks
// (the design rate: 24 bits, 192 clocks, per OFDM symbol). Each OFDM symbol
// leaves as 16 (I, Q) sample pairs on chan_i/chan_q with chan_valid high,
// samples signed with DATA_FRAC fraction bits, zero elsewhere.
// Timing: the first sample pair of a frame is on the outputs 24 clock edges
// after the edge that takes the frame's last bit (mapper 1, zero padding 1,
// transform 5, P/S 17 edges); the pairs follow on consecutive clocks.
module mwofdm_tx
  import mwofdm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    tx_bit,
  input  logic    tx_bit_valid,
  output sample_t chan_i,
  output sample_t chan_q,
  output logic    chan_valid
);

  logic    sym_valid;
  sample_t sym_i, sym_q;
  vbeat_t  padded, xformed;

  qpsk_mapper  u_map  (.clk, .rst_n, .bit_in(tx_bit), .bit_valid(tx_bit_valid),
                       .sym_valid, .sym_i, .sym_q);
  zero_pad     u_pad  (.clk, .rst_n, .sym_valid, .sym_i, .sym_q, .vout(padded));
  idmwcst      u_idwt (.clk, .rst_n, .vin(padded), .vout(xformed));
  ps_converter u_ps   (.clk, .rst_n, .vin(xformed), .out_i(chan_i), .out_q(chan_q),
                       .out_valid(chan_valid));

endmodule
