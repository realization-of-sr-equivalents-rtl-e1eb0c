// secure_scan_gsr_top_tb: end-to-end testbench of secure_scan_gsr_top at its
// only (default) configuration.
//
// Drives random serial data into all eleven lanes for two runs separated by a
// reset in mid-stream, and checks only what is visible at the pins:
//  - SR-equivalent lanes (R1, R6, R7 and both generic syntheses) return every
//    input bit exactly 3 clocks later;
//  - R2, R3 and the generic GF2SR return x(t) ^ x(t+2)x(t+1) 3 clocks later;
//  - R4, R5 and the generic GFSR match a reference model stepped with the
//    clock-by-clock equations of gsr_pkg;
//  - the generic lanes match their hand-built counterparts bit for bit (the
//    testbench feeds each pair the same input);
//  - after the mid-stream reset every lane restarts from its reset output.
// It also counts how often each mechanism happened and fails if one never did:
// a GSR lane deviating from a shift register, the output compensation term of
// R6 and the input compensation term of R7 being 1, and the reset.
module secure_scan_gsr_top_tb;
  import gsr_pkg::*;

  localparam int N_RUN = 300;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic [NUM_LANES-1:0] scan_in = '0;
  logic [NUM_LANES-1:0] scan_out;
  int                   checks = 0;
  int                   failures = 0;

  // mechanism counters
  int n_sr_ok = 0, n_deviate = 0, n_r6_comp = 0, n_r7_comp = 0, n_resets = 0, n_pairs = 0;

  logic [NUM_LANES-1:0] xh [N_RUN];
  state_t               m_r4, m_r5;

  secure_scan_gsr_top dut (.clk, .rst_n, .scan_in, .scan_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2 * N_RUN + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what, input int t);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL t=%0d: %s", t, what);
    end
  endtask

  // Reference models of the GFSR lanes, independent of the lane RTL.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_r4 <= '0;
      m_r5 <= '0;
    end else begin
      m_r4 <= gfsr_next(3, table_t'(R4_TABLE), scan_in[LANE_R4], m_r4);
      m_r5 <= gfsr_next(3, table_t'(R5_TABLE), scan_in[LANE_R5], m_r5);
    end
  end

  // Compensation terms inside R6 and R7 (observed, not checked).
  always @(posedge clk) begin
    if (rst_n && dut.u_r6.y[0] && !dut.u_r6.y[1]) n_r6_comp++;
    if (rst_n && dut.u_r7.y[0] && !dut.u_r7.y[1]) n_r7_comp++;
  end

  task automatic run_segment();
    logic [NUM_LANES-1:0] xr;
    logic                 f;
    for (int t = 0; t < N_RUN; t++) begin
      @(negedge clk);
      xr = NUM_LANES'({$urandom, $urandom});
      xr[LANE_GF2SR]      = xr[LANE_R3];
      xr[LANE_GFSR]       = xr[LANE_R5];
      xr[LANE_SREQ_GF2SR] = xr[LANE_R6];
      xr[LANE_SREQ_GFSR]  = xr[LANE_R7];
      scan_in = xr;
      #1;
      xh[t] = scan_in;
      // generic lanes equal their hand-built counterparts
      check(scan_out[LANE_GF2SR] == scan_out[LANE_R3], "generic GF2SR = R3", t);
      check(scan_out[LANE_GFSR] == scan_out[LANE_R5], "generic GFSR = R5", t);
      check(scan_out[LANE_SREQ_GF2SR] == scan_out[LANE_R6], "synthesized GF2SR = R6", t);
      check(scan_out[LANE_SREQ_GFSR] == scan_out[LANE_R7], "synthesized GFSR = R7", t);
      n_pairs++;
      check(scan_out[LANE_R4] == gfsr_out(3, table_t'(R4_TABLE), m_r4), "R4 = model", t);
      check(scan_out[LANE_R5] == gfsr_out(3, table_t'(R5_TABLE), m_r5), "R5 = model", t);
      if (t >= 3) begin
        foreach (xr[l]) begin
          if (l inside {LANE_R1, LANE_R6, LANE_R7, LANE_SREQ_GF2SR, LANE_SREQ_GFSR}) begin
            check(scan_out[l] == xh[t-3][l], $sformatf("lane %0d: z(t) = x(t-3)", l), t);
            if (scan_out[l] == xh[t-3][l]) n_sr_ok++;
          end else begin
            if (scan_out[l] != xh[t-3][l]) n_deviate++;
          end
          if (l inside {LANE_R2, LANE_R3, LANE_GF2SR}) begin
            f = xh[t-1][l] & xh[t-2][l];
            check(scan_out[l] == (xh[t-3][l] ^ f), $sformatf("lane %0d: z(t) = x(t-3)^x(t-1)x(t-2)", l), t);
          end
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(scan_out == 11'b111_1111_0100, "outputs after reset", -1);
    rst_n = 1'b1;
    n_resets++;
    run_segment();
    // reset in mid-stream
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    check(scan_out == 11'b111_1111_0100, "outputs after mid-stream reset", -1);
    @(negedge clk);
    rst_n = 1'b1;
    n_resets++;
    run_segment();

    $display("mechanisms: sr_equivalent_bits=%0d gsr_deviations=%0d r6_output_term=%0d r7_input_term=%0d generic_vs_handbuilt=%0d resets=%0d",
             n_sr_ok, n_deviate, n_r6_comp, n_r7_comp, n_pairs, n_resets);
    check(n_sr_ok > 0, "SR-equivalent lanes exercised", -1);
    check(n_deviate > 0, "GSR lanes deviate from a shift register", -1);
    check(n_r6_comp > 0, "R6 output compensation exercised", -1);
    check(n_r7_comp > 0, "R7 input compensation exercised", -1);
    check(n_pairs > 0, "generic vs hand-built comparisons", -1);
    check(n_resets == 2, "reset applied twice", -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
