// gf2sr_r2: the 3-stage GF2SR example R2.
//
// A 3-stage shift register with one feed-forward term: the AND of the input
// and the first stage is XORed into the third stage's input.
//   y1 <= x,  y2 <= y1,  y3 <= y2 ^ (x & y1),  z = y3
// so z(t+3) = x(t) ^ x(t+2)x(t+1). The connections follow the published
// drawing; the gate functions (AND, XOR) are taken to be those of the
// example R3, which has the same drawing plus inverters and whose equations
// are given in full.
//
// Interface: clk, asynchronous active-low rst_n clearing y (this design's
// choice), serial x, serial z, state y (y[0] = y1). Latency x -> z: 3 clocks.
module gf2sr_r2 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x,
  output logic       z,
  output logic [2:0] y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= {y[1] ^ (x & y[0]), y[0], x};
  end

  assign z = y[2];

endmodule
