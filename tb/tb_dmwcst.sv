// tb_dmwcst: random vectors, one per clock with gaps, through the transform.
// Each result is compared with the floating-point GHM reference (y = W x for
// the forward transform, y = W^T x for the inverse) within 3 LSB, and must
// appear five clocks after its input (four edges after the one that takes
// it) with its valid and is_q flags.
module tb_dmwcst;
  import mwofdm_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  vbeat_t vin, vout;
  int checks = 0, failures = 0;
  int cyc = 0;

  dmwcst dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int x [NF]; logic q; int at; } item_t;
  item_t sent [$];

  initial begin
    forever begin
      @(posedge clk);
      #1;
      if (vout.valid) begin
        item_t it;
        rvec_t xr, yr;
        svec_t od;
        od = vout.data;
        checks++;
        if (sent.size() == 0) begin
          failures++;
          $display("unexpected output");
          continue;
        end
        it = sent.pop_front();
        for (int i = 0; i < NF; i++) xr[i] = real'(it.x[i]);
        yr = apply(1'b0, xr);
        if (cyc - it.at != 4 || vout.is_q !== it.q) begin
          failures++;
          $display("latency %0d or flag wrong", cyc - it.at);
        end
        for (int i = 0; i < NF; i++) begin
          real d;
          d = real'(int'(od[i])) - yr[i];
          checks++;
          if (d > 3.0 || d < -3.0) begin
            failures++;
            if (failures < 20) $display("out[%0d] = %0d, expected %f", i, int'(od[i]), yr[i]);
          end
        end
      end
    end
  end

  initial begin
    vin = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      item_t it;
      svec_t xv;
      int    gap;
      for (int i = 0; i < NF; i++) begin
        // full-scale impulses sometimes, otherwise values within +/-4.0
        if (n < 16) it.x[i] = (i == n) ? 256 : 0;
        else        it.x[i] = int'($urandom % 2048) - 1024;
        xv[i] = sample_t'(it.x[i]);
      end
      it.q = 1'($urandom);
      @(negedge clk);
      vin.valid = 1'b1;
      vin.is_q  = it.q;
      vin.data  = xv;
      @(posedge clk);
      #1;
      it.at = cyc;
      sent.push_back(it);
      gap = (n % 3 == 0) ? int'($urandom % 4) : 0;
      if (gap > 0) begin
        @(negedge clk);
        vin = '0;
        repeat (gap - 1) @(negedge clk);
      end
    end
    @(negedge clk);
    vin = '0;
    repeat (10) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin
      failures++;
      $display("%0d vectors never came out", sent.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
