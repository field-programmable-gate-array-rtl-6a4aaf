// tb_mwofdm_pkg: checks the transform coefficients of mwofdm_pkg. Every
// entry of W must be the floating-point GHM value within half an LSB of the
// 14-fraction-bit format, the integer matrix must be orthogonal to within
// rounding (W W^T = 2^28 I within 2^28 / 2000), no row or column of W or W^T
// may have more than MAX_NZ nonzero entries, and mw_nz_col must list exactly
// the nonzero columns of each row, in order.
module tb_mwofdm_pkg;
  import mwofdm_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real one;
    one = real'(1 << COEF_FRAC);
    // entries against the floating-point definition
    for (int r = 0; r < N_F; r++)
      for (int c = 0; c < N_F; c++) begin
        real d;
        d = real'(dmwcst_coef(r, c)) - w(r, c) * one;
        checks++;
        if (d > 0.5 || d < -0.5) begin
          failures++;
          $display("W[%0d][%0d] = %0d, expected %f", r, c, dmwcst_coef(r, c), w(r, c) * one);
        end
        checks++;
        if (mw_coef(1'b1, r, c) != dmwcst_coef(c, r)) begin
          failures++;
          $display("inverse matrix is not the transpose at %0d %0d", r, c);
        end
      end
    // orthogonality of the integer matrix
    for (int a = 0; a < N_F; a++)
      for (int b = 0; b < N_F; b++) begin
        longint s, e;
        s = 0;
        for (int c = 0; c < N_F; c++) s += longint'(dmwcst_coef(a, c)) * longint'(dmwcst_coef(b, c));
        e = (a == b) ? (longint'(1) << (2 * COEF_FRAC)) : 0;
        checks++;
        if (s - e > (longint'(1) << (2 * COEF_FRAC)) / 2000 || e - s > (longint'(1) << (2 * COEF_FRAC)) / 2000) begin
          failures++;
          $display("row %0d . row %0d = %0d, expected %0d", a, b, s, e);
        end
      end
    // nonzero lists
    for (int inv = 0; inv < 2; inv++)
      for (int r = 0; r < N_F; r++) begin
        int n;
        n = 0;
        for (int c = 0; c < N_F; c++)
          if (mw_coef(1'(inv), r, c) != 0) begin
            checks++;
            if (mw_nz_col(1'(inv), r, n) != c) begin
              failures++;
              $display("inverse=%0d row %0d: nonzero %0d listed at column %0d, expected %0d",
                       inv, r, n, mw_nz_col(1'(inv), r, n), c);
            end
            n++;
          end
        checks++;
        if (n > MAX_NZ || mw_nz_col(1'(inv), r, n) != -1) begin
          failures++;
          $display("inverse=%0d row %0d: %0d nonzero entries", inv, r, n);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
