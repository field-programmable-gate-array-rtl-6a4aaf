// tb_ps_converter: I vector then, SYM_CLKS clocks later, Q vector of random
// samples, for several frames. Sample pair k must leave on out_i/out_q with
// out_valid high 17 + k clock edges after the edge that takes the I vector,
// and both outputs must be zero and out_valid low elsewhere.
module tb_ps_converter;
  import mwofdm_pkg::*;

  logic clk = 0, rst_n = 0;
  vbeat_t vin;
  sample_t out_i, out_q;
  logic out_valid;
  int checks = 0, failures = 0;
  int cyc = 0;

  ps_converter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vi [16], vq [16];
  int t_i = -1000;

  // monitor
  initial begin
    forever begin
      int k;
      @(posedge clk);
      #1;
      if (!rst_n) continue;
      k = cyc - t_i - 17;
      checks++;
      if (k >= 0 && k < 16) begin
        if (!out_valid || int'(out_i) != vi[k] || int'(out_q) != vq[k]) begin
          failures++;
          $display("pair %0d: valid=%b I=%0d Q=%0d, expected %0d %0d", k, out_valid,
                   int'(out_i), int'(out_q), vi[k], vq[k]);
        end
      end else if (out_valid || out_i != 0 || out_q != 0) begin
        failures++;
        $display("cycle %0d: output outside a frame", cyc);
      end
    end
  end

  initial begin
    svec_t x;
    vin = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 6; f++) begin
      repeat (10 + (f % 2) * 30) @(negedge clk);
      for (int k = 0; k < 16; k++) begin
        vi[k] = int'($urandom % 4000) - 2000;
        x[k]  = sample_t'(vi[k]);
      end
      vin.valid = 1'b1;
      vin.is_q  = 1'b0;
      vin.data  = x;
      @(posedge clk);
      #1;
      t_i = cyc;
      @(negedge clk);
      vin = '0;
      repeat (SYM_CLKS - 1) @(negedge clk);
      for (int k = 0; k < 16; k++) begin
        vq[k] = int'($urandom % 4000) - 2000;
        x[k]  = sample_t'(vq[k]);
      end
      vin.valid = 1'b1;
      vin.is_q  = 1'b1;
      vin.data  = x;
      @(negedge clk);
      vin = '0;
      repeat (20) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
