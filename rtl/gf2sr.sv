// gf2sr: K-stage generalized feed-forward shift register (GF2SR).
//
// A shift register y1..yK whose links each XOR in an arbitrary Boolean function
// of the signals upstream of them:
//   y1     <= x  ^ f0
//   y(i+1) <= yi ^ fi(x, y1..y(i-1))      1 <= i < K
//   z       = yK ^ fK(x, y1..y(K-1))
// Because every fi reads only signals nearer the input, the output satisfies
// z(t+K) = x(t) ^ f(x(t+1)..x(t+K)) for some f fixed by the tables; used as a
// scan path it looks to an outsider like a shift register with a scrambled
// (but unknown) transfer function. The structure and equations are those of
// the published GF2SR class; how the functions are encoded is this design's
// choice: F is the concatenation of the truth tables of f0..fK, f_i starting
// at bit 2^i-1 and addressed by {y(i-1)..y1, x} (see gsr_pkg). F = 0 gives a
// plain shift register. The default F is the 3-stage example R3.
//
// Interface: clk, asynchronous active-low rst_n (clears all stages; reset
// value is this design's choice), serial in x, serial out z (combinational
// from x and the state), and the stage contents y (y[0] = y1). One shift per
// rising clock edge; z follows x in the same cycle when fK reads x.
module gf2sr #(
  parameter int                     K = 3,
  parameter logic [2**(K+1)-2:0]    F = gsr_pkg::R3_TABLE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x,
  output logic         z,
  output logic [K-1:0] y
);

  logic [K-1:0] v;     // {y(K-1)..y1, x}: all signals a function may read
  logic [K:0]   fval;  // fval[i] = f_i(...)
  logic [K-1:0] y_d;

  assign v = K'({y, x});

  for (genvar i = 0; i <= K; i++) begin : g_fn
    // truth table of f_i: 2^i bits starting at bit 2^i - 1
    localparam logic [2**i-1:0] TT = F[2**i-1 +: 2**i];
    if (i == 0) begin : g_const
      assign fval[i] = TT[0];
    end else begin : g_lut
      assign fval[i] = TT[v[i-1:0]];
    end
  end

  always_comb begin
    y_d[0] = x ^ fval[0];
    for (int i = 1; i < K; i++) y_d[i] = y[i-1] ^ fval[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= y_d;
  end

  assign z = y[K-1] ^ fval[K];

  if (K < 1) begin : g_check
    $error("gf2sr: K must be at least 1");
  end

endmodule
