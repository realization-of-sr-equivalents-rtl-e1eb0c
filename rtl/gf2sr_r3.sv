// gf2sr_r3: the 3-stage strongly secure GF2SR example R3.
//
//   y1 <= x,  y2 <= ~y1,  y3 <= y2 ^ (x & y1),  z = ~y3
// Its symbolic simulation gives z(t+3) = x(t) ^ x(t+2)x(t+1): the scan path
// does not return what was shifted in, and the state after three clocks is
// y1 = x(t+2), y2 = ~x(t+1), y3 = ~x(t) ^ x(t+2)x(t+1). Equations are those
// of the published example.
//
// Interface: clk, asynchronous active-low rst_n clearing y (this design's
// choice), serial x, serial z, state y (y[0] = y1). Latency x -> z: 3 clocks.
module gf2sr_r3 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x,
  output logic       z,
  output logic [2:0] y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= {y[1] ^ (x & y[0]), ~y[0], x};
  end

  assign z = ~y[2];

endmodule
