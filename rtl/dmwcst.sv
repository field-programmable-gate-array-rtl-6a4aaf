// dmwcst: 16-point forward discrete multiwavelet critical-sampling
// transform, the receiver's replacement for the FFT.
//
// Computes y = W x on each incoming vector, where W is the orthogonal GHM
// transform matrix of mwofdm_pkg, so it undoes idmwcst. The multiplication
// is done by mw_matmul with only its nonzero coefficients built (at most 7
// per output), as described; the choice of the GHM multiwavelet is this
// design's own.
//
// Interface and timing: one vbeat_t per clock in, the transformed vector
// out five clocks later with its valid and is_q flags.
module dmwcst
  import mwofdm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  vbeat_t vin,
  output vbeat_t vout
);

  mw_matmul #(.INVERSE(1'b0)) u_mm (.clk(clk), .rst_n(rst_n), .vin(vin), .vout(vout));

endmodule
