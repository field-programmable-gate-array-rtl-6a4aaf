// tb_mwofdm_tx: random bits at the design rate (one per BIT_CLKS clocks) for
// several OFDM symbols. For each symbol the 16 (I, Q) channel pairs are
// compared, within 3 LSB, with a floating-point model (QPSK mapping, zeros on
// subcarriers 0, 1, 14, 15, inverse GHM transform); the first pair must come
// 24 clock edges after the edge that takes the symbol's last bit, the pairs
// on 16 consecutive clocks, and the outputs must be zero between symbols.
module tb_mwofdm_tx;
  import mwofdm_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tx_bit, tx_bit_valid;
  sample_t chan_i, chan_q;
  logic chan_valid;
  int checks = 0, failures = 0;
  int cyc = 0;

  mwofdm_tx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  localparam int NFR = 6;

  initial begin
    repeat (NFR * 192 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rvec_t ei [NFR], eq [NFR];
  int t_last [NFR];
  int fm = 0;
  int nfr_seen = 0;

  initial begin
    for (int f = 0; f < NFR; f++) t_last[f] = 1 << 30;
    forever begin
      int d;
      @(posedge clk);
      #1;
      if (!rst_n) continue;
      d = (fm < NFR) ? cyc - t_last[fm] - 24 : -1;
      if (d >= 0 && d < 16) begin
        real ri, rq;
        ri = real'(int'(chan_i)) - ei[fm][d];
        rq = real'(int'(chan_q)) - eq[fm][d];
        checks++;
        if (!chan_valid || ri > 3.0 || ri < -3.0 || rq > 3.0 || rq < -3.0) begin
          failures++;
          $display("frame %0d pair %0d: valid=%b %0d %0d, expected %f %f", fm, d, chan_valid,
                   int'(chan_i), int'(chan_q), ei[fm][d], eq[fm][d]);
        end
        if (d == 15) begin
          fm++;
          nfr_seen++;
        end
      end else begin
        checks++;
        if (chan_valid || chan_i != 0 || chan_q != 0) begin
          failures++;
          $display("cycle %0d: output outside a frame", cyc);
        end
      end
    end
  end

  initial begin
    rvec_t xi, xq;
    logic b [24];
    tx_bit = 0; tx_bit_valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      for (int j = 0; j < 24; j++) b[j] = (f == 0) ? 1'b1 : (f == 1) ? 1'b0 : 1'($urandom);
      for (int k = 0; k < NF; k++) begin
        xi[k] = 0.0;
        xq[k] = 0.0;
      end
      for (int k = 0; k < 12; k++) begin
        xi[k + 2] = b[2*k]     ? 181.0 : -181.0;
        xq[k + 2] = b[2*k + 1] ? 181.0 : -181.0;
      end
      ei[f] = apply(1'b1, xi);
      eq[f] = apply(1'b1, xq);
      for (int j = 0; j < 24; j++) begin
        tx_bit = b[j];
        tx_bit_valid = 1;
        @(posedge clk);
        #1;
        if (j == 23) t_last[f] = cyc;
        @(negedge clk);
        tx_bit_valid = 0;
        repeat (BIT_CLKS - 1) @(negedge clk);
      end
    end
    repeat (100) @(posedge clk);
    checks++;
    if (nfr_seen != NFR) begin
      failures++;
      $display("%0d of %0d frames seen", nfr_seen, NFR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
