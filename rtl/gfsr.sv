// gfsr: K-stage generalized feedback shift register (GFSR).
//
// A shift register y1..yK whose links each XOR in an arbitrary Boolean function
// of the stages downstream of them (feedback):
//   y1     <= x  ^ f0(y1..yK)
//   y(i+1) <= yi ^ fi(y(i+1)..yK)         1 <= i < K
//   z       = yK ^ fK                     (fK is a constant)
// A value entering y1 reaches z after K clocks, so z(t+K) = x(t) ^ f(y(t)) for
// some f of the state fixed by the tables. Structure and equations follow the
// published GFSR class; the encoding is this design's choice: F is the
// concatenation of the truth tables of f0..fK, f_i starting at bit
// 2^(K+1) - 2^(K-i+1) and addressed by {yK..y(i+1)} (see gsr_pkg). F = 0 gives
// a plain shift register. The default F is the 3-stage example R5.
//
// Interface: clk, asynchronous active-low rst_n (clears all stages; this
// design's choice), serial in x, serial out z (a function of the state only),
// and the stage contents y (y[0] = y1). One shift per rising clock edge.
module gfsr #(
  parameter int                     K = 3,
  parameter logic [2**(K+1)-2:0]    F = gsr_pkg::R5_TABLE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x,
  output logic         z,
  output logic [K-1:0] y
);

  logic [K:0]   fval;  // fval[i] = f_i(...)
  logic [K-1:0] y_d;

  for (genvar i = 0; i <= K; i++) begin : g_fn
    // truth table of f_i: 2^(K-i) bits starting at bit 2^(K+1) - 2^(K-i+1)
    localparam logic [2**(K-i)-1:0] TT = F[2**(K+1) - 2**(K-i+1) +: 2**(K-i)];
    if (i == K) begin : g_const
      assign fval[i] = TT[0];
    end else begin : g_lut
      assign fval[i] = TT[y[K-1:i]];
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
    $error("gfsr: K must be at least 1");
  end

endmodule
