// sreq_gf2sr_r6: example R6, the SR-equivalent GF2SR made from R3.
//
// R3 has z(t+3) = x(t) ^ x(t+2)x(t+1). Three clocks after x(t) entered,
// x(t+2) sits in y1 and ~x(t+1) in y2, so the error term equals y1 & ~y2 of
// the current state. XORing that feed-forward term into the output cancels
// it: z = ~y3 ^ (y1 & ~y2) and z(t+3) = x(t). This module is R3 (gf2sr_r3)
// plus that one AND and XOR, as in the published construction.
//
// Interface: clk, asynchronous active-low rst_n (this design's choice), serial
// x, serial z, state y of the embedded R3 (y[0] = y1). Latency x -> z: 3 clocks,
// exactly like a 3-stage shift register.
module sreq_gf2sr_r6 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x,
  output logic       z,
  output logic [2:0] y
);

  logic z_r3;

  gf2sr_r3 u_r3 (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (x),
    .z    (z_r3),
    .y    (y)
  );

  assign z = z_r3 ^ (y[0] & ~y[1]);

endmodule
