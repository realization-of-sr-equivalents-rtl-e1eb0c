// secure_scan_gsr_top: every scan-path structure of the design, side by side.
//
// Each lane is an independent 3-stage serial path (scan in -> scan out) built
// from one of the circuits: the SR-equivalent R1, the generalized shift
// registers R2..R5, the SR-equivalent GSRs R6 and R7 obtained from R3 and R5 by
// the published synthesis method (hand-built), and the generic parameterized
// GF2SR, GFSR and their SR-equivalent syntheses, whose default tables are R3
// and R5 and whose synthesized versions therefore equal R6 and R7. Lane
// numbers are given by gsr_pkg::lane_e. The flip-flop contents are not brought
// out: seen from the pins, the SR-equivalent lanes are indistinguishable from
// 3-stage shift registers and the others from scrambling 3-clock delay lines,
// which is the property a secure scan path relies on. Putting the lanes side
// by side in one top is this design's choice; the published material treats
// each circuit on its own and does not describe the surrounding chip.
//
// Interface: clk (all lanes shift on every rising edge), asynchronous
// active-low rst_n clearing every flip-flop, scan_in[lane], scan_out[lane].
// Latency of every lane: 3 clocks.
module secure_scan_gsr_top
  import gsr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_LANES-1:0] scan_in,
  output logic [NUM_LANES-1:0] scan_out
);

  // Internal states: deliberately not ports.
  logic [2:0] y_r1, y_r2, y_r3, y_r4, y_r5, y_r6, y_r7;
  logic [2:0] y_gf2sr, y_gfsr, y_sreq_gf2sr, y_sreq_gfsr;

  sr_equiv_r1 u_r1 (
    .clk, .rst_n, .x(scan_in[LANE_R1]), .z(scan_out[LANE_R1]), .y(y_r1)
  );

  gf2sr_r2 u_r2 (
    .clk, .rst_n, .x(scan_in[LANE_R2]), .z(scan_out[LANE_R2]), .y(y_r2)
  );

  gf2sr_r3 u_r3 (
    .clk, .rst_n, .x(scan_in[LANE_R3]), .z(scan_out[LANE_R3]), .y(y_r3)
  );

  gfsr_r4 u_r4 (
    .clk, .rst_n, .x(scan_in[LANE_R4]), .z(scan_out[LANE_R4]), .y(y_r4)
  );

  gfsr_r5 u_r5 (
    .clk, .rst_n, .x(scan_in[LANE_R5]), .z(scan_out[LANE_R5]), .y(y_r5)
  );

  sreq_gf2sr_r6 u_r6 (
    .clk, .rst_n, .x(scan_in[LANE_R6]), .z(scan_out[LANE_R6]), .y(y_r6)
  );

  sreq_gfsr_r7 u_r7 (
    .clk, .rst_n, .x(scan_in[LANE_R7]), .z(scan_out[LANE_R7]), .y(y_r7)
  );

  gf2sr u_gf2sr (
    .clk, .rst_n, .x(scan_in[LANE_GF2SR]), .z(scan_out[LANE_GF2SR]), .y(y_gf2sr)
  );

  gfsr u_gfsr (
    .clk, .rst_n, .x(scan_in[LANE_GFSR]), .z(scan_out[LANE_GFSR]), .y(y_gfsr)
  );

  sreq_gf2sr u_sreq_gf2sr (
    .clk, .rst_n, .x(scan_in[LANE_SREQ_GF2SR]), .z(scan_out[LANE_SREQ_GF2SR]), .y(y_sreq_gf2sr)
  );

  sreq_gfsr u_sreq_gfsr (
    .clk, .rst_n, .x(scan_in[LANE_SREQ_GFSR]), .z(scan_out[LANE_SREQ_GFSR]), .y(y_sreq_gfsr)
  );

endmodule
