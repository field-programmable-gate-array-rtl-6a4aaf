// mwofdm_top: multiwavelet OFDM baseband system, transmitter and receiver
// connected back to back.
//
// The serial bit stream enters mwofdm_tx, whose 16-sample I and Q frames go
// straight into mwofdm_rx, which returns the bit stream. This is the
// arrangement of the described hardware co-simulation, where the recovered
// bits are compared with the input bits; the channel samples are also brought
// out so they can be observed.
//
// Interface: tx_bit/tx_bit_valid, one bit every BIT_CLKS = 8 clocks
// (24 bits per OFDM symbol, one OFDM symbol every 192 clocks). rx_bit with
// rx_bit_valid returns the same bits at the same rate after a fixed delay
// (see mwofdm_tx and mwofdm_rx). chan_i/chan_q/chan_valid show the
// transmitted samples.
module mwofdm_top
  import mwofdm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    tx_bit,
  input  logic    tx_bit_valid,
  output sample_t chan_i,
  output sample_t chan_q,
  output logic    chan_valid,
  output logic    rx_bit,
  output logic    rx_bit_valid
);

  mwofdm_tx u_tx (.clk, .rst_n, .tx_bit, .tx_bit_valid, .chan_i, .chan_q, .chan_valid);
  mwofdm_rx u_rx (.clk, .rst_n, .chan_i, .chan_q, .chan_valid, .rx_bit, .rx_bit_valid);

endmodule
