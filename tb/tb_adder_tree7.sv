// tb_adder_tree7: random seven-input vectors every clock; the sum must appear
// three register stages later (on the third clock edge that follows).
module tb_adder_tree7;
  localparam int W = 35;
  logic clk = 0;
  logic signed [W-1:0] in [7];
  logic signed [W-1:0] sum;
  longint expv [1000];
  int checks = 0, failures = 0;

  adder_tree7 #(.W(W)) dut (.clk, .in, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s;
    for (int i = 0; i < 7; i++) in[i] = '0;
    for (int t = 0; t < 1000; t++) begin
      s = 0;
      for (int i = 0; i < 7; i++) begin
        in[i] = W'($signed(32'($urandom)) >>> 3);
        s += longint'(in[i]);
      end
      expv[t] = s;
      @(posedge clk);
      #1;
      // the sum of the inputs taken at this edge appears two edges later
      if (t >= 2) begin
        checks++;
        if (longint'(sum) != expv[t-2]) begin
          failures++;
          if (failures < 10) $display("t=%0d sum=%0d expected %0d", t, sum, expv[t-2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
