// tb_mwofdm_rx: channel frames built by a floating-point transmitter model
// (QPSK, zeros on subcarriers 0, 1, 14, 15, inverse GHM transform, rounded)
// plus uniform noise of up to +/-NOISE LSB on every sample, one frame every
// 192 clocks. The 24 recovered bits of each frame must equal the bits sent,
// the first 40 clock edges after the edge that takes the frame's first pair
// and the rest BIT_CLKS clocks apart.
module tb_mwofdm_rx;
  import mwofdm_pkg::*;
  import tb_ref_pkg::*;

  localparam int NFR   = 8;
  localparam int NOISE = 24;

  logic clk = 0, rst_n = 0;
  sample_t chan_i, chan_q;
  logic chan_valid;
  logic rx_bit, rx_bit_valid;
  int checks = 0, failures = 0;
  int cyc = 0;

  mwofdm_rx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (NFR * 192 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic bits [NFR][24];
  int t0 [NFR];
  int fm = 0, nbits = 0;

  initial begin
    for (int f = 0; f < NFR; f++) t0[f] = 1 << 30;
    forever begin
      int d;
      @(posedge clk);
      #1;
      if (!rst_n) continue;
      d = (fm < NFR) ? cyc - t0[fm] - 40 : -1;
      if (d >= 0 && d % BIT_CLKS == 0 && d / BIT_CLKS < 24) begin
        int j;
        j = d / BIT_CLKS;
        checks++;
        if (!rx_bit_valid || rx_bit !== bits[fm][j]) begin
          failures++;
          $display("frame %0d bit %0d: valid=%b bit=%b, expected %b", fm, j, rx_bit_valid,
                   rx_bit, bits[fm][j]);
        end
        nbits++;
        if (j == 23) fm++;
      end else begin
        checks++;
        if (rx_bit_valid) begin
          failures++;
          $display("unexpected bit at cycle %0d", cyc);
        end
      end
    end
  end

  initial begin
    rvec_t xi, xq, yi, yq;
    chan_i = '0; chan_q = '0; chan_valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      for (int k = 0; k < NF; k++) begin
        xi[k] = 0.0;
        xq[k] = 0.0;
      end
      for (int k = 0; k < 12; k++) begin
        bits[f][2*k]     = 1'($urandom);
        bits[f][2*k + 1] = 1'($urandom);
        xi[k + 2] = bits[f][2*k]     ? 181.0 : -181.0;
        xq[k + 2] = bits[f][2*k + 1] ? 181.0 : -181.0;
      end
      yi = apply(1'b1, xi);
      yq = apply(1'b1, xq);
      for (int k = 0; k < NF; k++) begin
        chan_valid = 1;
        chan_i = sample_t'($rtoi(yi[k] + (yi[k] >= 0.0 ? 0.5 : -0.5)) + int'($urandom % (2*NOISE + 1)) - NOISE);
        chan_q = sample_t'($rtoi(yq[k] + (yq[k] >= 0.0 ? 0.5 : -0.5)) + int'($urandom % (2*NOISE + 1)) - NOISE);
        @(posedge clk);
        #1;
        if (k == 0) t0[f] = cyc;
        @(negedge clk);
      end
      chan_valid = 0; chan_i = '0; chan_q = '0;
      repeat (N_C * SYM_CLKS - NF) @(negedge clk);
    end
    repeat (300) @(posedge clk);
    checks++;
    if (nbits != NFR * 24) begin
      failures++;
      $display("%0d bits seen, expected %0d", nbits, NFR * 24);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
