// gsr_pkg: shared constants and elaboration-time functions for generalized
// shift registers (GSRs).
//
// A k-stage GSR is a chain of k flip-flops y1..yk between a serial input x and
// a serial output z, where each link of the chain XORs in an arbitrary Boolean
// function f_i:
//
//   feed-forward (GF2SR): y1 <= x ^ f0,  y(i+1) <= yi ^ fi(x, y1..y(i-1)),
//                         z = yk ^ fk(x, y1..y(k-1))
//   feedback (GFSR):      y1 <= x ^ f0(y1..yk),  y(i+1) <= yi ^ fi(y(i+1)..yk),
//                         z = yk ^ fk
//
// A whole GSR is described by one "truth-table vector" F of 2^(k+1)-1 bits,
// which is the concatenation of the truth tables of f0..fk (k+1 functions whose
// input counts are 0..k). Bit layout:
//   GF2SR: f_i has i inputs {y(i-1)..y1, x} (x is address bit 0); its table
//          starts at bit 2^i - 1.
//   GFSR:  f_i has k-i inputs {yk..y(i+1)} (y(i+1) is address bit 0); its
//          table starts at bit 2^(k+1) - 2^(k-i+1).
// A vector of all zeros is the plain k-stage shift register.
//
// The functions below simulate one clock of either structure and, from that,
// compute at elaboration time the compensation that turns any GSR into one that
// is functionally a k-stage shift register (z(t+k) = x(t)): the "SR-equivalent"
// GSR. The GF2SR compensation is a function g XORed into the output function
// fk; the GFSR compensation is a function f XORed into the input function f0.
// Both are found by exhaustive simulation, which is the bit-level form of the
// symbolic simulation used to derive them by hand. That limits K to MAX_K.
//
// The truth-table vectors of the seven 3-stage example circuits R1..R7 are also
// kept here so that the generic modules can be checked against the hand-written
// gate-level ones.
package gsr_pkg;

  // Largest stage count the elaboration-time functions handle (a design choice:
  // the table vector grows as 2^(K+1)).
  localparam int MAX_K = 8;
  localparam int MAX_F = 2 ** (MAX_K + 1) - 1;

  typedef logic [MAX_F-1:0] table_t;
  typedef logic [MAX_K-1:0] state_t;

  // Number of truth-table bits of a k-stage GSR (both kinds).
  function automatic int table_bits(int k);
    return 2 ** (k + 1) - 1;
  endfunction

  // First bit of f_i's truth table.
  function automatic int gf2sr_offset(int i);
    return 2 ** i - 1;
  endfunction

  function automatic int gfsr_offset(int k, int i);
    return 2 ** (k + 1) - 2 ** (k - i + 1);
  endfunction

  // Address of f_i in a GF2SR: the low i bits of {y, x}.
  function automatic int gf2sr_addr(int i, logic x, state_t y);
    logic [MAX_K:0] v;
    v = {y, x};
    return int'(v) & ((1 << i) - 1);
  endfunction

  // Address of f_i in a k-stage GFSR: y(i+1)..yk.
  function automatic int gfsr_addr(int k, int i, state_t y);
    return (int'(y) >> i) & ((1 << (k - i)) - 1);
  endfunction

  // One clock of a k-stage GF2SR: next state from input x and state y.
  function automatic state_t gf2sr_next(int k, table_t f, logic x, state_t y);
    state_t n;
    n = '0;
    for (int i = 0; i < k; i++) begin
      n[i] = ((i == 0) ? x : y[i-1]) ^ f[gf2sr_offset(i) + gf2sr_addr(i, x, y)];
    end
    return n;
  endfunction

  function automatic logic gf2sr_out(int k, table_t f, logic x, state_t y);
    return y[k-1] ^ f[gf2sr_offset(k) + gf2sr_addr(k, x, y)];
  endfunction

  // One clock of a k-stage GFSR.
  function automatic state_t gfsr_next(int k, table_t f, logic x, state_t y);
    state_t n;
    n = '0;
    for (int i = 0; i < k; i++) begin
      n[i] = ((i == 0) ? x : y[i-1]) ^ f[gfsr_offset(k, i) + gfsr_addr(k, i, y)];
    end
    return n;
  endfunction

  function automatic logic gfsr_out(int k, table_t f, state_t y);
    return y[k-1] ^ f[gfsr_offset(k, k)];
  endfunction

  // Theorem-1 synthesis. For every input sequence x(t)..x(t+k) the GF2SR is
  // run k clocks (its state after k clocks depends on the inputs only), and
  // g(x(t+k), y(t+k)) = z(t+k) ^ x(t) is recorded. g never depends on yk, so
  // it fits in fk's table; the result has fk replaced by fk ^ g.
  function automatic table_t gf2sr_sreq_table(int k, table_t f);
    table_t r;
    logic [2**MAX_K-1:0] g;
    state_t y;
    logic xk;
    int a;
    r = f;
    g = '0;
    for (int s = 0; s < 2 ** (k + 1); s++) begin
      y = '0;
      for (int j = 0; j < k; j++) y = gf2sr_next(k, f, s[j], y);
      xk = s[k];
      a = gf2sr_addr(k, xk, y);
      g[a] = gf2sr_out(k, f, xk, y) ^ s[0];
    end
    for (int i = 0; i < 2 ** k; i++) r[gf2sr_offset(k) + i] = f[gf2sr_offset(k) + i] ^ g[i];
    return r;
  endfunction

  // Theorem-2 synthesis. From every state y(t), with x(t) = 0, the GFSR is run
  // k clocks; z(t+k) is then f(y(t)), which later inputs cannot reach. The
  // result has f0 replaced by f0 ^ f.
  function automatic table_t gfsr_sreq_table(int k, table_t f);
    table_t r;
    state_t y;
    r = f;
    for (int s = 0; s < 2 ** k; s++) begin
      y = state_t'(s);
      for (int j = 0; j < k; j++) y = gfsr_next(k, f, 1'b0, y);
      r[s] = f[s] ^ gfsr_out(k, f, y);
    end
    return r;
  endfunction

  // Truth-table vectors of the 3-stage examples (layouts as above).
  // R1: f2 = y1, f3 = y2.                    (SR-equivalent)
  localparam logic [14:0] R1_TABLE = 15'b111100001100000;
  // R2: f2 = x&y1.
  localparam logic [14:0] R2_TABLE = 15'b000000001000000;
  // R3: f1 = 1, f2 = x&y1, f3 = 1.
  localparam logic [14:0] R3_TABLE = 15'b111111111000110;
  // R6: R3 with f3 = ~(y1&~y2).               (SR-equivalent)
  localparam logic [14:0] R6_TABLE = 15'b111100111000110;
  // R4: f1 = y2&y3.
  localparam logic [14:0] R4_TABLE = 15'b000100000000000;
  // R5: f0 = 1, f1 = y2&~y3, f3 = 1.
  localparam logic [14:0] R5_TABLE = 15'b100001011111111;
  // R7: R5 with f0 = ~(y1&~y2).               (SR-equivalent)
  localparam logic [14:0] R7_TABLE = 15'b100001011011101;

  // Lanes of secure_scan_gsr_top: one serial in/out pair per circuit.
  typedef enum int {
    LANE_R1        = 0,   // SR-equivalent R1
    LANE_R2        = 1,   // GF2SR R2
    LANE_R3        = 2,   // GF2SR R3
    LANE_R4        = 3,   // GFSR R4
    LANE_R5        = 4,   // GFSR R5
    LANE_R6        = 5,   // SR-equivalent GF2SR R6 (R3 + output term)
    LANE_R7        = 6,   // SR-equivalent GFSR R7 (R5 + input term)
    LANE_GF2SR     = 7,   // generic GF2SR, default table (= R3)
    LANE_GFSR      = 8,   // generic GFSR, default table (= R5)
    LANE_SREQ_GF2SR = 9,  // generic SR-equivalent synthesis from R3 (= R6)
    LANE_SREQ_GFSR = 10   // generic SR-equivalent synthesis from R5 (= R7)
  } lane_e;
  localparam int NUM_LANES = 11;

endpackage
