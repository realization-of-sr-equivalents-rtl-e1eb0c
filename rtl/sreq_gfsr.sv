// sreq_gfsr: SR-equivalent GFSR synthesized from an arbitrary GFSR.
//
// Given a K-stage GFSR (truth-table vector F, see gfsr), whose output obeys
// z(t+K) = x(t) ^ f(y1(t)..yK(t)), this module builds the modified GFSR whose
// output obeys z(t+K) = x(t). Following the published method, the same f is
// XORed into the input: the first stage loads x ^ f0(y) ^ f(y), so the two
// copies of f cancel at the output K clocks later. f is found at elaboration
// time by running the GFSR K clocks from every state with x(t) = 0
// (gsr_pkg::gfsr_sreq_table), which limits K to gsr_pkg::MAX_K; the hardware is
// then an ordinary gfsr with the new table. With the default F (example R5)
// the result is the example R7, whose extra feedback term is y1 & ~y2.
//
// Interface and timing as gfsr: z(t+K) = x(t) for every t >= 0 after reset.
module sreq_gfsr #(
  parameter int                     K = 3,
  parameter logic [2**(K+1)-2:0]    F = gsr_pkg::R5_TABLE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x,
  output logic         z,
  output logic [K-1:0] y
);

  localparam int TW = 2 ** (K + 1) - 1;
  localparam gsr_pkg::table_t F_FULL = gsr_pkg::table_t'(F);
  localparam gsr_pkg::table_t F_SREQ_FULL = gsr_pkg::gfsr_sreq_table(K, F_FULL);
  localparam logic [TW-1:0] F_SREQ = F_SREQ_FULL[TW-1:0];

  if (K > gsr_pkg::MAX_K) begin : g_check
    $error("sreq_gfsr: K exceeds gsr_pkg::MAX_K");
  end

  gfsr #(.K(K), .F(F_SREQ)) u_gsr (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (x),
    .z    (z),
    .y    (y)
  );

endmodule
