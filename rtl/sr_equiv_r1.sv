// sr_equiv_r1: the 3-stage SR-equivalent circuit R1.
//
// Three flip-flops wired so that the serial behaviour is that of a 3-stage
// shift register, z(t+3) = x(t), while the stored values are not the last
// three inputs (y3 holds y1 ^ y2 of the previous cycle):
//   y1 <= x,  y2 <= y1,  y3 <= y1 ^ y2,  z = y2 ^ y3
// Equations are the published example's (its symbolic-simulation table). In
// GSR terms it is a GF2SR with f2 = y1 and f3 = y2, so it is itself an
// SR-equivalent GF2SR.
//
// Interface: clk, asynchronous active-low rst_n clearing y (this design's
// choice), serial x, serial z (combinational from the state), state y
// (y[0] = y1). Latency x -> z: 3 clocks.
module sr_equiv_r1 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x,
  output logic       z,
  output logic [2:0] y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= {y[0] ^ y[1], y[0], x};
  end

  assign z = y[1] ^ y[2];

endmodule
