// tb_qpsk_mapper: random bit pairs, at the design rate and back to back;
// each symbol must be {MSB ? +181 : -181, LSB ? +181 : -181} and appear one
// clock after the second bit.
module tb_qpsk_mapper;
  import mwofdm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic bit_in = 0, bit_valid = 0;
  logic sym_valid;
  sample_t sym_i, sym_q;
  int checks = 0, failures = 0;

  qpsk_mapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bit(input logic b, input int gap);
    bit_in    <= b;
    bit_valid <= 1'b1;
    @(posedge clk);
    bit_valid <= 1'b0;
    repeat (gap - 1) @(posedge clk);
  endtask

  initial begin
    logic b0, b1;
    int gap;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      b0  = 1'($urandom);
      b1  = 1'($urandom);
      gap = (n < 100) ? BIT_CLKS : 1 + ($urandom % 3);
      send_bit(b0, gap);
      bit_in    <= b1;
      bit_valid <= 1'b1;
      @(posedge clk);
      bit_valid <= 1'b0;
      #1;
      checks++;
      if (!sym_valid || sym_i !== (b0 ? 16'sd181 : -16'sd181) || sym_q !== (b1 ? 16'sd181 : -16'sd181)) begin
        failures++;
        $display("symbol %0d: bits %b%b got valid=%b I=%0d Q=%0d", n, b0, b1, sym_valid, sym_i, sym_q);
      end
      @(posedge clk);
      #1;
      checks++;
      if (sym_valid) begin
        failures++;
        $display("symbol %0d: valid longer than one clock", n);
      end
      repeat (gap - 2 > 0 ? gap - 2 : 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
