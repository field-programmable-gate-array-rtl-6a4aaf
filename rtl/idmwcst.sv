// idmwcst: 16-point inverse discrete multiwavelet critical-sampling
// transform, the transmitter's replacement for the IFFT.
//
// Computes y = W^T x on each incoming vector, where W is the orthogonal GHM
// transform matrix of mwofdm_pkg; the multiplication is done by mw_matmul
// with only its nonzero coefficients (at most 7 per output) built, which
// follows the described design. The choice of the GHM multiwavelet for W is
// this design's own.
//
// Interface and timing: one vbeat_t per clock in, the transformed vector
// out five clocks later with its valid and is_q flags.
module idmwcst
  import mwofdm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  vbeat_t vin,
  output vbeat_t vout
);

  mw_matmul #(.INVERSE(1'b1)) u_mm (.clk(clk), .rst_n(rst_n), .vin(vin), .vout(vout));

endmodule
