// sreq_gf2sr: SR-equivalent GF2SR synthesized from an arbitrary GF2SR.
//
// Given a K-stage GF2SR (truth-table vector F, see gf2sr), whose output obeys
// z(t+K) = x(t) ^ f(x(t+1)..x(t+K)), this module builds the modified GF2SR
// whose output obeys z(t+K) = x(t): a circuit that behaves at its pins exactly
// like a K-stage shift register while its internal states differ from one.
// The method is the published one: f is rewritten as a function
// g(x, y1..yK) of the current input and state (possible because the state
// after K clocks is a one-to-one image of the last K inputs), and g is XORed
// into the output, i.e. fK is replaced by fK ^ g. g is found at elaboration
// time by exhaustive simulation (gsr_pkg::gf2sr_sreq_table), which limits K to
// gsr_pkg::MAX_K; the hardware is then an ordinary gf2sr with the new table.
// With the default F (example R3) the result is the example R6, whose extra
// output term is g = y1 & ~y2.
//
// Interface and timing as gf2sr: z(t+K) = x(t) for every t >= K after reset.
module sreq_gf2sr #(
  parameter int                     K = 3,
  parameter logic [2**(K+1)-2:0]    F = gsr_pkg::R3_TABLE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x,
  output logic         z,
  output logic [K-1:0] y
);

  localparam int TW = 2 ** (K + 1) - 1;
  localparam gsr_pkg::table_t F_FULL = gsr_pkg::table_t'(F);
  localparam gsr_pkg::table_t F_SREQ_FULL = gsr_pkg::gf2sr_sreq_table(K, F_FULL);
  localparam logic [TW-1:0] F_SREQ = F_SREQ_FULL[TW-1:0];

  if (K > gsr_pkg::MAX_K) begin : g_check
    $error("sreq_gf2sr: K exceeds gsr_pkg::MAX_K");
  end

  gf2sr #(.K(K), .F(F_SREQ)) u_gsr (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (x),
    .z    (z),
    .y    (y)
  );

endmodule
