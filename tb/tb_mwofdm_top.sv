// tb_mwofdm_top: end-to-end run of the whole transceiver at its default
// sizes. Random bits (plus one all-ones and one all-zeros OFDM symbol) enter
// at the design rate, one every BIT_CLKS clocks, for NFR OFDM symbols. Checks:
//  - every bit comes back, in order, exactly LAT clocks after it went in;
//  - each OFDM symbol goes over the channel as one burst of 16 sample pairs;
//  - the inserted null subcarriers are exactly zero at the transmitter
//    transform input and come back within +/-4 LSB of zero at the receiver
//    transform output;
//  - the I part and the Q part of every symbol pass through each transform,
//    the Q part SYM_CLKS clocks after the I part.
// It also counts each mechanism (all four QPSK points, null subcarrier
// insertion and removal, I/Q time sharing of both transforms, channel bursts)
// and counts a failure for any that never happened.
module tb_mwofdm_top;
  import mwofdm_pkg::*;

  localparam int NFR = 24;
  localparam int LAT = 249;   // clocks from a bit entering to the same bit leaving

  logic clk = 0, rst_n = 0;
  logic tx_bit, tx_bit_valid;
  sample_t chan_i, chan_q;
  logic chan_valid;
  logic rx_bit, rx_bit_valid;
  int checks = 0, failures = 0;
  int cyc = 0;

  mwofdm_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (NFR * N_C * SYM_CLKS + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int t; logic b; } sent_t;
  sent_t sent [$];
  int n_rx = 0;
  int n_points [4];
  int n_bursts = 0, burst_len = 0;
  int n_tx_i = 0, n_tx_q = 0, n_rx_i = 0, n_rx_q = 0;
  int last_tx_i = -1000, last_rx_i = -1000;
  int n_null_tx = 0, n_null_rx = 0;

  // received bits against sent bits
  always @(posedge clk) begin
    #1;
    if (rst_n && rx_bit_valid) begin
      checks++;
      if (sent.size() == 0) begin
        failures++;
        $display("cycle %0d: bit out with none outstanding", cyc);
      end else begin
        sent_t s;
        s = sent.pop_front();
        if (rx_bit !== s.b || cyc - s.t != LAT) begin
          failures++;
          if (failures < 20)
            $display("bit %0d: got %b after %0d clocks, expected %b after %0d", n_rx, rx_bit,
                     cyc - s.t, s.b, LAT);
        end
      end
      n_rx++;
    end
  end

  // channel bursts
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (chan_valid) burst_len++;
      else if (burst_len != 0) begin
        checks++;
        n_bursts++;
        if (burst_len != N_F) begin
          failures++;
          $display("channel burst of %0d pairs", burst_len);
        end
        burst_len = 0;
      end
    end
  end

  // null subcarriers and I/Q time sharing inside the transceiver
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      vbeat_t p, tx, rx;
      svec_t d;
      p  = dut.u_tx.padded;
      tx = dut.u_tx.xformed;
      rx = dut.u_rx.xformed;
      if (p.valid) begin
        d = p.data;
        checks++;
        if (d[0] != 0 || d[1] != 0 || d[14] != 0 || d[15] != 0) begin
          failures++;
          $display("null subcarrier not zero before the inverse transform");
        end else n_null_tx++;
      end
      if (tx.valid) begin
        if (!tx.is_q) begin
          n_tx_i++;
          last_tx_i = cyc;
        end else begin
          n_tx_q++;
          checks++;
          if (cyc - last_tx_i != SYM_CLKS) begin
            failures++;
            $display("transmit Q vector %0d clocks after I vector", cyc - last_tx_i);
          end
        end
      end
      if (rx.valid) begin
        d = rx.data;
        if (!rx.is_q) begin
          n_rx_i++;
          last_rx_i = cyc;
        end else begin
          n_rx_q++;
          checks++;
          if (cyc - last_rx_i != SYM_CLKS) begin
            failures++;
            $display("receive Q vector %0d clocks after I vector", cyc - last_rx_i);
          end
        end
        checks++;
        if ((d[0] > 4 || d[0] < -4) || (d[1] > 4 || d[1] < -4) ||
            (d[14] > 4 || d[14] < -4) || (d[15] > 4 || d[15] < -4)) begin
          failures++;
          $display("null subcarrier not near zero after the forward transform");
        end else n_null_rx++;
      end
    end
  end

  task automatic mechanism(input string name, input int n);
    checks++;
    $display("%-40s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("  never happened");
    end
  endtask

  initial begin
    logic b [24];
    tx_bit = 0; tx_bit_valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      for (int j = 0; j < 24; j++) b[j] = (f == 1) ? 1'b1 : (f == 2) ? 1'b0 : 1'($urandom);
      for (int k = 0; k < 12; k++) n_points[{b[2*k], b[2*k+1]}]++;
      for (int j = 0; j < 24; j++) begin
        tx_bit = b[j];
        tx_bit_valid = 1;
        @(posedge clk);
        #1;
        sent.push_back('{cyc, b[j]});
        @(negedge clk);
        tx_bit_valid = 0;
        repeat (BIT_CLKS - 1) @(negedge clk);
      end
    end
    repeat (LAT + 50) @(posedge clk);
    checks++;
    if (n_rx != NFR * 24 || sent.size() != 0) begin
      failures++;
      $display("%0d bits received of %0d", n_rx, NFR * 24);
    end
    mechanism("QPSK point 00", n_points[0]);
    mechanism("QPSK point 01", n_points[1]);
    mechanism("QPSK point 10", n_points[2]);
    mechanism("QPSK point 11", n_points[3]);
    mechanism("null subcarriers inserted", n_null_tx);
    mechanism("null subcarriers removed", n_null_rx);
    mechanism("inverse transform, I part", n_tx_i);
    mechanism("inverse transform, Q part", n_tx_q);
    mechanism("forward transform, I part", n_rx_i);
    mechanism("forward transform, Q part", n_rx_q);
    mechanism("channel bursts of 16 I/Q pairs", n_bursts);
    mechanism("bits recovered", n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
