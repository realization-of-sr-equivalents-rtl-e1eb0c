// gfsr_r4: the 3-stage GFSR example R4.
//
// A 3-stage shift register with one feedback term: the AND of stages 2 and 3
// is XORed into the second stage's input.
//   y1 <= x,  y2 <= y1 ^ (y2 & y3),  y3 <= y2,  z = y3
// so z(t+3) = x(t) ^ y1(t)y2(t) ^ y2(t)y3(t). The connections follow the
// published drawing; the gate functions are taken to be those of example R5,
// which has the same drawing plus inverters and whose equations are given.
//
// Interface: clk, asynchronous active-low rst_n clearing y (this design's
// choice), serial x, serial z, state y (y[0] = y1). Latency x -> z: 3 clocks.
module gfsr_r4 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x,
  output logic       z,
  output logic [2:0] y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= {y[1], y[0] ^ (y[1] & y[2]), x};
  end

  assign z = y[2];

endmodule
