// tb_sp_converter: frames of 16 random (I, Q) sample pairs, at the design
// spacing and as close as the block allows (32 clocks). The I vector must
// appear 16 clock edges after the edge that takes the first pair and the Q
// vector 16 edges later, element k holding sample k, and nothing in between.
module tb_sp_converter;
  import mwofdm_pkg::*;

  logic clk = 0, rst_n = 0;
  sample_t in_i, in_q;
  logic in_valid;
  vbeat_t vout;
  int checks = 0, failures = 0;
  int cyc = 0;

  sp_converter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vi [6][16], vq [6][16];
  int t0 [6];
  int fm = 0;                       // frame the monitor is waiting for
  int nvec = 0;

  initial begin
    forever begin
      @(posedge clk);
      #1;
      if (!rst_n) continue;
      if (fm < 6 && (cyc - t0[fm] == 15 || cyc - t0[fm] == 31)) begin
        svec_t d;
        bit q;
        q = (cyc - t0[fm] == 31);
        d = vout.data;
        checks++;
        if (!vout.valid || vout.is_q != q) begin
          failures++;
          $display("vector missing at cycle %0d", cyc);
        end
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (int'(d[k]) != (q ? vq[fm][k] : vi[fm][k])) begin
            failures++;
            $display("is_q=%b element %0d = %0d, expected %0d", q, k, int'(d[k]),
                     q ? vq[fm][k] : vi[fm][k]);
          end
        end
        nvec++;
        if (q) fm++;
      end else begin
        checks++;
        if (vout.valid) begin
          failures++;
          $display("unexpected vector at cycle %0d", cyc);
        end
      end
    end
  end

  initial begin
    for (int f = 0; f < 6; f++) t0[f] = -1000;
    in_i = '0; in_q = '0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(negedge clk);
    for (int f = 0; f < 6; f++) begin
      for (int k = 0; k < 16; k++) begin
        vi[f][k] = int'($urandom % 4000) - 2000;
        vq[f][k] = int'($urandom % 4000) - 2000;
      end
      for (int k = 0; k < 16; k++) begin
        in_valid = 1;
        in_i = sample_t'(vi[f][k]);
        in_q = sample_t'(vq[f][k]);
        @(posedge clk);
        #1;
        if (k == 0) t0[f] = cyc;
        @(negedge clk);
      end
      in_valid = 0; in_i = '0; in_q = '0;
      // next frame at 32 clocks (tightest) or at the design spacing of 192
      repeat ((f % 2 == 1) ? 16 : 176) @(negedge clk);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (nvec != 12) begin
      failures++;
      $display("%0d vectors seen, expected 12", nvec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
