// mw_matmul: constant-matrix multiplier shared by the forward and inverse
// multiwavelet transforms.
//
// Output k is the sum over columns c of M[k][c] * x[c], where M is the GHM
// transform matrix W (INVERSE = 0) or its transpose (INVERSE = 1), taken from
// mwofdm_pkg. Only the nonzero entries are built: for each output the
// columns with nonzero coefficients are found at elaboration, each gets one
// constant multiplier, and the products meet in an adder_tree7. Rows with
// fewer than seven nonzero entries feed zeros to the spare tree inputs.
//
// Arithmetic: samples carry DATA_FRAC fraction bits and coefficients
// COEF_FRAC, so a product has DATA_FRAC + COEF_FRAC. The sum is rounded to
// nearest (half up) back to DATA_FRAC fraction bits and saturated to DATA_W.
//
// Timing: fully pipelined, one vector per clock. Products are registered (1),
// the adder tree takes 3, rounding and saturation 1: the result of the vector
// present in clock cycle t is on vout in cycle t + 5 (LATENCY = 5). The
// valid and is_q flags travel with the data.
module mw_matmul
  import mwofdm_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  vbeat_t vin,
  output vbeat_t vout
);

  localparam int LATENCY = 5;
  localparam int PW      = DATA_W + COEF_W;       // product width
  localparam int SW      = PW + 3;                // sum width with headroom

  typedef logic signed [SW-1:0] acc_t;

  svec_t res;

  for (genvar k = 0; k < N_F; k++) begin : g_out
    acc_t prod [7];
    acc_t sum;
    for (genvar n = 0; n < MAX_NZ; n++) begin : g_tap
      localparam int COL  = mw_nz_col(INVERSE, k, n);
      localparam int COEF = (COL >= 0) ? mw_coef(INVERSE, k, COL) : 0;
      if (COL >= 0) begin : g_mul
        logic signed [COEF_W-1:0] c;
        assign c = COEF_W'(COEF);
        always_ff @(posedge clk) prod[n] <= acc_t'(vin.data[COL] * c);
      end else begin : g_zero
        always_ff @(posedge clk) prod[n] <= '0;
      end
    end
    adder_tree7 #(.W(SW)) u_tree (.clk(clk), .in(prod), .sum(sum));

    // round half up, drop COEF_FRAC bits, saturate to DATA_W
    acc_t rnd;
    acc_t shifted;
    always_comb begin
      rnd     = sum + acc_t'(1 <<< (COEF_FRAC - 1));
      shifted = rnd >>> COEF_FRAC;
      if (shifted > acc_t'(2 ** (DATA_W - 1) - 1))
        res[k] = sample_t'(2 ** (DATA_W - 1) - 1);
      else if (shifted < -acc_t'(2 ** (DATA_W - 1)))
        res[k] = sample_t'(-(2 ** (DATA_W - 1)));
      else
        res[k] = sample_t'(shifted);
    end
  end

  // flags follow the data through the product and tree stages
  logic [LATENCY-2:0] v_pipe, q_pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_pipe <= '0;
      q_pipe <= '0;
      vout   <= '0;
    end else begin
      v_pipe     <= {v_pipe[LATENCY-3:0], vin.valid};
      q_pipe     <= {q_pipe[LATENCY-3:0], vin.is_q};
      vout.valid <= v_pipe[LATENCY-2];
      vout.is_q  <= q_pipe[LATENCY-2];
      vout.data  <= res;
    end
  end

endmodule
