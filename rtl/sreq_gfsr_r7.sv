// sreq_gfsr_r7: example R7, the SR-equivalent GFSR made from R5.
//
// R5 has z(t+3) = x(t) ^ y1(t)~y2(t): the error term is a function of the
// state at the time x(t) enters. Feeding the same term back into the input,
// x' = x ^ (y1 & ~y2), makes R5 see x'(t) and emit x'(t) ^ y1(t)~y2(t) = x(t).
// This module is R5 (gfsr_r5) plus that one AND and XOR in front of it, as in
// the published construction.
//
// Interface: clk, asynchronous active-low rst_n (this design's choice), serial
// x, serial z, state y of the embedded R5 (y[0] = y1). Latency x -> z: 3 clocks,
// exactly like a 3-stage shift register.
module sreq_gfsr_r7 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x,
  output logic       z,
  output logic [2:0] y
);

  logic x_fb;

  assign x_fb = x ^ (y[0] & ~y[1]);

  gfsr_r5 u_r5 (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (x_fb),
    .z    (z),
    .y    (y)
  );

endmodule
