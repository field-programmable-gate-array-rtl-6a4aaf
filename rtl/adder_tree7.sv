// adder_tree7: seven-input pipelined adder tree.
//
// Sums the (up to) seven nonzero products that make one transform output.
// The tree has the described shape: (in1 + in2) + (in3 + in4) on one side,
// (in5 + in6) + in7 on the other, and a final adder joining the two. Each of
// the three adder levels is registered (this design's pipelining choice), so
// the sum of the inputs present at clock t appears at the output after clock
// t + 2, i.e. latency LATENCY = 3 clocks, one result per clock.
//
// The output is W bits wide like the inputs; the caller sizes W with three
// bits of headroom so no sum can overflow.
module adder_tree7 #(
  parameter int W = 32
) (
  input  logic                 clk,
  input  logic signed [W-1:0]  in [7],
  output logic signed [W-1:0]  sum
);

  logic signed [W-1:0] s3, s2, s4, in7_d;   // level 1
  logic signed [W-1:0] s5, s6;              // level 2

  always_ff @(posedge clk) begin
    // level 1 (AddSub3, AddSub2, AddSub4; in7 waits one clock)
    s3    <= in[0] + in[1];
    s2    <= in[2] + in[3];
    s4    <= in[4] + in[5];
    in7_d <= in[6];
    // level 2 (AddSub5, AddSub6)
    s5    <= s3 + s2;
    s6    <= s4 + in7_d;
    // level 3 (AddSub7)
    sum   <= s5 + s6;
  end

endmodule
