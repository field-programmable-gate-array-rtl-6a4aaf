// tb_qpsk_demapper: symbols at the design rate (one per 2*BIT_CLKS clocks)
// with random I and Q values, including exact zeros and the smallest
// positive and negative values. Each symbol must give the bits (I > 0) and
// then (Q > 0), the first one clock edge after the edge that takes the
// symbol and the second BIT_CLKS clocks later, and no other bit.
module tb_qpsk_demapper;
  import mwofdm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sym_valid;
  sample_t sym_i, sym_q;
  logic bit_out, bit_valid;
  int checks = 0, failures = 0;
  int cyc = 0;

  qpsk_demapper dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int t; logic b; } exp_t;
  exp_t expq [$];
  int nbits = 0;

  initial begin
    forever begin
      @(posedge clk);
      #1;
      if (!rst_n) continue;
      if (expq.size() > 0 && cyc == expq[0].t) begin
        exp_t e;
        e = expq.pop_front();
        checks++;
        if (!bit_valid || bit_out !== e.b) begin
          failures++;
          $display("cycle %0d: valid=%b bit=%b, expected %b", cyc, bit_valid, bit_out, e.b);
        end
        nbits++;
      end else begin
        checks++;
        if (bit_valid) begin
          failures++;
          $display("unexpected bit at cycle %0d", cyc);
        end
      end
    end
  end

  function automatic int pick(input int n);
    case (n % 8)
      0: return 0;
      1: return 1;
      2: return -1;
      default: return int'($urandom % 1000) - 500;
    endcase
  endfunction

  initial begin
    int vi, vq;
    sym_valid = 0; sym_i = '0; sym_q = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      vi = pick(n);
      vq = pick(n / 8 + n);
      sym_valid = 1; sym_i = sample_t'(vi); sym_q = sample_t'(vq);
      @(posedge clk);
      #1;
      expq.push_back('{cyc + 1, vi > 0});
      expq.push_back('{cyc + 1 + BIT_CLKS, vq > 0});
      @(negedge clk);
      sym_valid = 0;
      repeat (2 * BIT_CLKS - 1) @(negedge clk);
    end
    repeat (30) @(posedge clk);
    checks++;
    if (nbits != 200) begin
      failures++;
      $display("%0d bits seen, expected 200", nbits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
