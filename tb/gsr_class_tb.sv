// gsr_class_tb: exhaustive check of the SR-equivalent class sizes, k = 2 and 3.
//
// A 2-stage GSR has 2^(2+1)-1 = 7 truth-table bits, so there are 128 GF2SRs and
// 128 GFSRs (the all-zero table being the plain shift register). This
// testbench instantiates all of them, plus the SR-equivalent synthesis
// (sreq_gf2sr / sreq_gfsr) of each, drives them all with one random stream
// and records which ones ever emit something other than x(t-2).
// Expected, from the class-size results (2^(2^k-1) - 1 non-trivial
// SR-equivalent GSRs of each kind, i.e. 7 at k = 2, plus the shift register):
//   - exactly 8 of the 128 GF2SRs and 8 of the 128 GFSRs are SR-equivalent;
//   - every one of the 256 synthesized circuits is SR-equivalent;
//   - appending a stage to each of the 8 one-stage GF2SRs (its table
//     zero-extended) and synthesizing gives 8 distinct tables, which are
//     exactly the 8 SR-equivalent GF2SRs found by simulation; likewise the
//     synthesized tables of all 128 GFSRs take exactly 8 distinct values,
//     all found SR-equivalent by simulation.
// At k = 3 (32768 tables of each kind) the circuits are not instantiated; the
// count is made on the clock-by-clock model of gsr_pkg instead:
//   - the 128 two-stage GF2SRs, a stage appended and synthesized, give 128
//     distinct 3-stage tables, each delivering z(t+3) = x(t) on the model;
//   - the synthesized tables of all 32768 three-stage GFSRs take exactly
//     2^(2^3-1) = 128 distinct values.
module gsr_class_tb;
  localparam int N_CFG = 128;
  localparam int N     = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic [N_CFG-1:0] z_ff, z_fb, z_sff, z_sfb;
  logic [N_CFG-1:0] bad_ff = '0, bad_fb = '0, bad_sff = '0, bad_sfb = '0;
  logic [2:0]       hist = '0;

  for (genvar i = 0; i < N_CFG; i++) begin : g_cfg
    logic [1:0] y_ff, y_fb, y_sff, y_sfb;
    gf2sr      #(.K(2), .F(7'(i))) u_ff  (.clk, .rst_n, .x, .z(z_ff[i]),  .y(y_ff));
    gfsr       #(.K(2), .F(7'(i))) u_fb  (.clk, .rst_n, .x, .z(z_fb[i]),  .y(y_fb));
    sreq_gf2sr #(.K(2), .F(7'(i))) u_sff (.clk, .rst_n, .x, .z(z_sff[i]), .y(y_sff));
    sreq_gfsr  #(.K(2), .F(7'(i))) u_sfb (.clk, .rst_n, .x, .z(z_sfb[i]), .y(y_sfb));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    check($countones(gf2sr_from_one_stage()) == 8, "8 distinct tables from the 8 one-stage GF2SRs");
    check(gf2sr_from_one_stage() == ~bad_ff, "appended-and-synthesized set = simulated SR-equivalent GF2SRs");
    check($countones(gfsr_images()) == 8, "synthesized GFSR tables take 8 values");
    check(gfsr_images() == ~bad_fb, "synthesized GFSR set = simulated SR-equivalent GFSRs");
    begin
      int n_ff3, n_fb3, n_bad3;
      n_ff3 = count_gf2sr_k3(n_bad3);
      n_fb3 = count_gfsr_k3();
      $display("k=3: %0d distinct SR-equivalent GF2SR tables from 128 two-stage GF2SRs (%0d not SR-equivalent), %0d distinct synthesized GFSR tables",
               n_ff3, n_bad3, n_fb3);
      check(n_ff3 == 128, "k=3: 128 distinct appended-and-synthesized GF2SR tables");
      check(n_bad3 == 0, "k=3: every one of them is SR-equivalent");
      check(n_fb3 == 128, "k=3: synthesized GFSR tables take 128 values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Set of table indices, as a 128-bit mask, reached by the synthesis.
  function automatic logic [N_CFG-1:0] gf2sr_from_one_stage();
    logic [N_CFG-1:0] hit = '0;
    for (int i = 0; i < 8; i++) begin
      hit[int'(gsr_pkg::gf2sr_sreq_table(2, gsr_pkg::table_t'(i))) & 127] = 1'b1;
    end
    return hit;
  endfunction

  function automatic logic [N_CFG-1:0] gfsr_images();
    logic [N_CFG-1:0] hit = '0;
    for (int i = 0; i < N_CFG; i++) begin
      hit[int'(gsr_pkg::gfsr_sreq_table(2, gsr_pkg::table_t'(i))) & 127] = 1'b1;
    end
    return hit;
  endfunction

  // k = 3 counts on the model.
  function automatic int count_gf2sr_k3(output int not_sr);
    logic [32767:0] hit = '0;
    int             idx;
    gsr_pkg::table_t f;
    gsr_pkg::state_t y;
    logic [3:0]     h;
    logic           xi;
    not_sr = 0;
    for (int i = 0; i < 128; i++) begin
      f = gsr_pkg::gf2sr_sreq_table(3, gsr_pkg::table_t'(i));
      idx = int'(f) & 32767;
      hit[idx] = 1'b1;
      y = gsr_pkg::state_t'(i * 5);  // arbitrary start state
      h = '0;
      for (int t = 0; t < 40; t++) begin
        xi = 1'($urandom);
        h = {h[2:0], xi};
        if (t >= 3 && gsr_pkg::gf2sr_out(3, f, xi, y) != h[3]) begin
          not_sr++;
          break;
        end
        y = gsr_pkg::gf2sr_next(3, f, xi, y);
      end
    end
    return $countones(hit);
  endfunction

  function automatic int count_gfsr_k3();
    logic [32767:0] hit = '0;
    for (int i = 0; i < 32768; i++) begin
      hit[int'(gsr_pkg::gfsr_sreq_table(3, gsr_pkg::table_t'(i))) & 32767] = 1'b1;
    end
    return $countones(hit);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      x = 1'($urandom);
      #1;
      hist = {hist[1:0], x};
      if (t >= 2) begin
        bad_ff  |= z_ff  ^ {N_CFG{hist[2]}};
        bad_fb  |= z_fb  ^ {N_CFG{hist[2]}};
        bad_sff |= z_sff ^ {N_CFG{hist[2]}};
        bad_sfb |= z_sfb ^ {N_CFG{hist[2]}};
      end
    end
    $display("SR-equivalent: GF2SR %0d/128, GFSR %0d/128, synthesized GF2SR %0d/128, synthesized GFSR %0d/128",
             N_CFG - $countones(bad_ff), N_CFG - $countones(bad_fb),
             N_CFG - $countones(bad_sff), N_CFG - $countones(bad_sfb));
    check(N_CFG - $countones(bad_ff) == 8, "8 SR-equivalent 2-stage GF2SRs");
    check(N_CFG - $countones(bad_fb) == 8, "8 SR-equivalent 2-stage GFSRs");
    check(!bad_ff[0] && !bad_fb[0], "the all-zero table is a shift register");
    check(bad_sff == '0, "every synthesized GF2SR is SR-equivalent");
    check(bad_sfb == '0, "every synthesized GFSR is SR-equivalent");
    check($countones(gf2sr_from_one_stage()) == 8, "8 distinct tables from the 8 one-stage GF2SRs");
    check(gf2sr_from_one_stage() == ~bad_ff, "appended-and-synthesized set = simulated SR-equivalent GF2SRs");
    check($countones(gfsr_images()) == 8, "synthesized GFSR tables take 8 values");
    check(gfsr_images() == ~bad_fb, "synthesized GFSR set = simulated SR-equivalent GFSRs");
    begin
      int n_ff3, n_fb3, n_bad3;
      n_ff3 = count_gf2sr_k3(n_bad3);
      n_fb3 = count_gfsr_k3();
      $display("k=3: %0d distinct SR-equivalent GF2SR tables from 128 two-stage GF2SRs (%0d not SR-equivalent), %0d distinct synthesized GFSR tables",
               n_ff3, n_bad3, n_fb3);
      check(n_ff3 == 128, "k=3: 128 distinct appended-and-synthesized GF2SR tables");
      check(n_bad3 == 0, "k=3: every one of them is SR-equivalent");
      check(n_fb3 == 128, "k=3: synthesized GFSR tables take 128 values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
