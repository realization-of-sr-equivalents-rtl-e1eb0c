// gfsr_r5: the 3-stage strongly secure GFSR example R5.
//
//   y1 <= ~x,  y2 <= y1 ^ (y2 & ~y3),  y3 <= y2,  z = ~y3
// Its symbolic simulation gives z(t+3) = x(t) ^ y1(t)~y2(t): what comes out
// depends on the unknown state at the time the bit went in. Equations are
// those of the published example.
//
// Interface: clk, asynchronous active-low rst_n clearing y (this design's
// choice), serial x, serial z (a function of the state only), state y
// (y[0] = y1). Latency x -> z: 3 clocks.
module gfsr_r5 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x,
  output logic       z,
  output logic [2:0] y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= {y[1], y[0] ^ (y[1] & ~y[2]), ~x};
  end

  assign z = ~y[2];

endmodule
