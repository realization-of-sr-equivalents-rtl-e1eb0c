// sr_delay_monitor: testbench helper that checks shift-register behaviour.
//
// Every falling clock edge (plus 2 time units, after the testbench has applied
// a new input) it records x and, once K+1 inputs have been seen since en rose,
// checks z against the input of K cycles earlier: z(t) = x(t-K). When
// EXPECT_SR is 0 the same comparison is made but a mismatch is what is
// expected; the monitor then only counts how often z differs from the delayed
// input (deviations), and the testbench decides whether that number is right.
module sr_delay_monitor #(
  parameter int K         = 3,
  parameter bit EXPECT_SR = 1'b1
) (
  input  logic clk,
  input  logic en,
  input  logic x,
  input  logic z,
  output int   checks,
  output int   failures,
  output int   deviations
);
  logic [K:0] hist;
  int         seen;

  initial begin
    checks = 0;
    failures = 0;
    deviations = 0;
    seen = 0;
    hist = '0;
  end

  always @(negedge clk) begin
    #2;
    if (en) begin
      hist = {hist[K-1:0], x};
      seen++;
      if (seen > K) begin
        if (z != hist[K]) deviations++;
        if (EXPECT_SR) begin
          checks++;
          if (z != hist[K]) begin
            failures++;
            if (failures <= 5) $display("FAIL %m: z != x(t-%0d) at sample %0d", K, seen);
          end
        end
      end
    end
  end
endmodule
