// tb_remove_zeros: I vector, then SYM_CLKS clocks later the Q vector, of
// random values for several back-to-back frames (one every 192 clocks, the
// design rate). Pair k must hold subcarrier k + 2 of each vector and leave
// 1 + k*SYM_CLKS clocks after the edge that takes the Q vector, with
// sym_valid high for exactly those clocks.
module tb_remove_zeros;
  import mwofdm_pkg::*;

  logic clk = 0, rst_n = 0;
  vbeat_t vin;
  logic sym_valid;
  sample_t sym_i, sym_q;
  int checks = 0, failures = 0;
  int cyc = 0;

  remove_zeros dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NFR = 5;
  int vi [NFR][16], vq [NFR][16];
  int tq [NFR];
  int fm = 0;
  int npairs = 0;

  initial begin
    forever begin
      int d;
      @(posedge clk);
      #1;
      if (!rst_n || fm >= NFR) continue;
      d = cyc - tq[fm];
      if (d >= 1 && d % SYM_CLKS == 1 && d / SYM_CLKS < 12) begin
        int k;
        k = d / SYM_CLKS;
        checks++;
        if (!sym_valid || int'(sym_i) != vi[fm][k + 2] || int'(sym_q) != vq[fm][k + 2]) begin
          failures++;
          $display("frame %0d pair %0d: valid=%b %0d %0d, expected %0d %0d", fm, k, sym_valid,
                   int'(sym_i), int'(sym_q), vi[fm][k + 2], vq[fm][k + 2]);
        end
        npairs++;
        if (k == 11) fm++;
      end else begin
        checks++;
        if (sym_valid) begin
          failures++;
          $display("unexpected pair at cycle %0d", cyc);
        end
      end
    end
  end

  initial begin
    svec_t x;
    for (int f = 0; f < NFR; f++) tq[f] = 1 << 30;
    vin = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      for (int k = 0; k < 16; k++) begin
        vi[f][k] = int'($urandom % 4000) - 2000;
        vq[f][k] = int'($urandom % 4000) - 2000;
      end
      for (int k = 0; k < 16; k++) x[k] = sample_t'(vi[f][k]);
      vin.valid = 1; vin.is_q = 0; vin.data = x;
      @(negedge clk);
      vin = '0;
      repeat (SYM_CLKS - 1) @(negedge clk);
      for (int k = 0; k < 16; k++) x[k] = sample_t'(vq[f][k]);
      vin.valid = 1; vin.is_q = 1; vin.data = x;
      @(posedge clk);
      #1;
      tq[f] = cyc;
      @(negedge clk);
      vin = '0;
      repeat (N_C * SYM_CLKS - SYM_CLKS - 1) @(negedge clk);
    end
    repeat (200) @(posedge clk);
    checks++;
    if (npairs != NFR * 12) begin
      failures++;
      $display("%0d pairs seen", npairs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
