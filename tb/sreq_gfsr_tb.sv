// sreq_gfsr_tb: self-checking testbench for sreq_gfsr.
//
// Several instances with different stage counts and truth tables share one
// random serial input stream:
//   u_k3           default source table; z(t) = x(t-3) and identical to the
//                  hand-built example that the published method gives
//   u_k1/2/4/5/8   random source tables; z(t) = x(t-K) for each
// A plain gfsr with the same source table runs alongside to show that the
// source circuit is not SR-equivalent and the synthesis is what fixes it.
//   u_single       only f0 (= y1&y3) is non-zero, so the synthesized circuit is a plain shift register
//                  (a single-function GSR turns into a shift register)
// Ends with a TB_RESULT line; a watchdog stops a hung run.
module sreq_gfsr_tb;
  import gsr_pkg::*;
  localparam int N = 600;
  localparam logic [2:0]   T1 = 3'h2;
  localparam logic [6:0]   T2 = 7'h79;
  localparam logic [30:0]  T4 = 31'h134f069b;
  localparam logic [62:0]  T5 = 63'h5351d2286513270e;
  localparam logic [510:0] T8 = 511'h8f105c76b0d549b6f03675a1600a35a099950d836f675cc81e74ef5e8e25d940ed904759531985d5d9dc9f81818e811892f902bd23f0824128b2f330c5c7fd0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic z3, zex, zsrc, z1, z2, z4, z5, z8;
  logic [2:0] y3, yex, ysrc;
  logic [0:0] y1;
  logic [1:0] y2;
  logic [3:0] y4;
  logic [4:0] y5;
  logic [7:0] y8;
  int c[6], f[6], d[6], dsrc, csrc, fsrc;
  logic zsg;
  logic [2:0] ysg;
  logic [2:0] xhist = '0;

  sreq_gfsr #(.K(3), .F(15'h00A0)) u_single (.clk, .rst_n, .x, .z(zsg), .y(ysg));

  sreq_gfsr u_k3 (.clk, .rst_n, .x, .z(z3), .y(y3));
  sreq_gfsr_r7 u_example (.clk, .rst_n, .x, .z(zex), .y(yex));
  gfsr #(.K(3), .F(R5_TABLE)) u_source (.clk, .rst_n, .x, .z(zsrc), .y(ysrc));
  sreq_gfsr #(.K(1), .F(T1)) u_k1 (.clk, .rst_n, .x, .z(z1), .y(y1));
  sreq_gfsr #(.K(2), .F(T2)) u_k2 (.clk, .rst_n, .x, .z(z2), .y(y2));
  sreq_gfsr #(.K(4), .F(T4)) u_k4 (.clk, .rst_n, .x, .z(z4), .y(y4));
  sreq_gfsr #(.K(5), .F(T5)) u_k5 (.clk, .rst_n, .x, .z(z5), .y(y5));
  sreq_gfsr #(.K(8), .F(T8)) u_k8 (.clk, .rst_n, .x, .z(z8), .y(y8));

  sr_delay_monitor #(.K(3)) s_k3 (.clk, .en(rst_n), .x, .z(z3), .checks(c[0]), .failures(f[0]), .deviations(d[0]));
  sr_delay_monitor #(.K(1)) s_k1 (.clk, .en(rst_n), .x, .z(z1), .checks(c[1]), .failures(f[1]), .deviations(d[1]));
  sr_delay_monitor #(.K(2)) s_k2 (.clk, .en(rst_n), .x, .z(z2), .checks(c[2]), .failures(f[2]), .deviations(d[2]));
  sr_delay_monitor #(.K(4)) s_k4 (.clk, .en(rst_n), .x, .z(z4), .checks(c[3]), .failures(f[3]), .deviations(d[3]));
  sr_delay_monitor #(.K(5)) s_k5 (.clk, .en(rst_n), .x, .z(z5), .checks(c[4]), .failures(f[4]), .deviations(d[4]));
  sr_delay_monitor #(.K(8)) s_k8 (.clk, .en(rst_n), .x, .z(z8), .checks(c[5]), .failures(f[5]), .deviations(d[5]));
  sr_delay_monitor #(.K(3), .EXPECT_SR(1'b0)) s_src (.clk, .en(rst_n), .x, .z(zsrc), .checks(csrc), .failures(fsrc), .deviations(dsrc));

  // The generic synthesis must reproduce the hand-built example exactly.
  int seen_single = 0;
  always @(posedge clk) if (rst_n) begin
    xhist <= {xhist[1:0], x};
    seen_single <= seen_single + 1;
  end

  always @(negedge clk) begin
    #3;
    if (rst_n) begin
      checks++;
      if (ysg != {xhist[2], xhist[1], xhist[0]} && seen_single >= 3) begin
        failures++;
        if (failures <= 10) $display("FAIL: single-function GFSR state is not the last three inputs");
      end
      checks++;
      if ({z3, y3} != {zex, yex}) begin
        failures++;
        if (failures <= 10) $display("FAIL: generic result differs from sreq_gfsr_r7");
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (N) begin
      @(negedge clk);
      x = 1'($urandom);
    end
    @(negedge clk);
    #5;
    foreach (c[i]) begin
      checks += c[i];
      failures += f[i];
    end
    checks++;
    if (dsrc == 0) begin
      failures++;
      $display("FAIL: source circuit never deviated from a shift register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
