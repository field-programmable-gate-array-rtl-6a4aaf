// tb_zero_pad: three frames of 12 random symbols at the design rate (one per
// SYM_CLKS clocks) and one frame at one symbol per clock. Checks the I vector
// one clock after the last symbol, the Q vector SYM_CLKS clocks after it,
// subcarriers 0, 1, 14, 15 at zero, symbol k on subcarrier k + 2, and a zero
// output between vectors.
module tb_zero_pad;
  import mwofdm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sym_valid = 0;
  sample_t sym_i = '0, sym_q = '0;
  vbeat_t vout;
  int checks = 0, failures = 0;
  int cyc = 0;

  zero_pad dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t fi [12], fq [12];
  int last_cyc;

  // monitor
  initial begin
    int nvec = 0;
    forever begin
      @(posedge clk);
      #1;
      if (!rst_n) continue;
      if (vout.valid) begin
        svec_t e;
        int lag;
        e = '0;
        for (int k = 0; k < 12; k++) e[k + 2] = vout.is_q ? fq[k] : fi[k];
        lag = cyc - last_cyc;
        checks++;
        if (vout.data !== e || lag != (vout.is_q ? 1 + SYM_CLKS : 1)) begin
          failures++;
          $display("vector %0d (is_q=%b) lag %0d wrong", nvec, vout.is_q, lag);
        end
        nvec++;
      end else begin
        checks++;
        if (vout.data !== '0) begin
          failures++;
          $display("nonzero data between vectors at cycle %0d", cyc);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 4; f++) begin
      for (int k = 0; k < 12; k++) begin
        fi[k] = sample_t'($urandom);
        fq[k] = sample_t'($urandom);
        sym_valid <= 1;
        sym_i <= fi[k];
        sym_q <= fq[k];
        @(posedge clk);
        last_cyc = cyc;
        sym_valid <= 0;
        if (f < 3) repeat (SYM_CLKS - 1) @(posedge clk);
      end
      repeat (2 * SYM_CLKS) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
