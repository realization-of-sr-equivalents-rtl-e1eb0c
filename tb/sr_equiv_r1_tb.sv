// sr_equiv_r1_tb: self-checking testbench for sr_equiv_r1.
//
// Drives a random serial stream into the circuit after reset and checks, every
// cycle from the fourth on, the output and the three stage values against the
// closed-form expressions of R1 (SR-equivalent: z(t+3) = x(t)), evaluated on the recorded input history
// (xh[t] is the input during cycle t, yh[t] the state during cycle t). Also
// checks that reset clears the state. Ends with a TB_RESULT line; a watchdog
// stops a hung run.
module sr_equiv_r1_tb;
  localparam int N = 400;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       x = 1'b0;
  logic       z;
  logic [2:0] y;
  int         checks = 0;
  int         failures = 0;
  logic       xh [N];
  logic       zh [N];
  logic [2:0] yh [N];

  sr_equiv_r1 dut (.clk(clk), .rst_n(rst_n), .x(x), .z(z), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2 * N + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what, input int t);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL t=%0d: %s", t, what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(y == 3'b000, "reset clears the state", -1);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      x = 1'($urandom);
      #1;
      xh[t] = x;
      zh[t] = z;
      yh[t] = y;
      if (t >= 3) begin
        check(zh[t] == xh[t-3], "z(t) = x(t-3)", t);
        check(yh[t][0] == xh[t-1], "y1(t) = x(t-1)", t);
        check(yh[t][1] == xh[t-2], "y2(t) = x(t-2)", t);
        check(yh[t][2] == (xh[t-3] ^ xh[t-2]), "y3(t) = x(t-3)^x(t-2)", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
