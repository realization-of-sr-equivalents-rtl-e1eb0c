// gf2sr_tb: self-checking testbench for gf2sr.
//
// Several instances with different stage counts and truth tables share one
// random serial input stream:
//   u_k3      default table, compared with the reference model (gsr_model_monitor)
//   u_k3_sr   a 3-stage table that is SR-equivalent: z(t) = x(t-3)
//   u_k1/2/4/5 random tables, compared with the reference model
// The default instance must also deviate from a plain shift register.
// Ends with a TB_RESULT line; a watchdog stops a hung run.
module gf2sr_tb;
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

  logic z3, z3s, z1, z2, z4, z5;
  logic [2:0] y3, y3s;
  logic [0:0] y1;
  logic [1:0] y2;
  logic [3:0] y4;
  logic [4:0] y5;
  int c[6], f[6], d[2], dummy[2];

  gf2sr u_k3 (.clk, .rst_n, .x, .z(z3), .y(y3));
  gf2sr #(.K(3), .F(R1_TABLE)) u_k3_sr (.clk, .rst_n, .x, .z(z3s), .y(y3s));
  gf2sr #(.K(1), .F(T1)) u_k1 (.clk, .rst_n, .x, .z(z1), .y(y1));
  gf2sr #(.K(2), .F(T2)) u_k2 (.clk, .rst_n, .x, .z(z2), .y(y2));
  gf2sr #(.K(4), .F(T4)) u_k4 (.clk, .rst_n, .x, .z(z4), .y(y4));
  gf2sr #(.K(5), .F(T5)) u_k5 (.clk, .rst_n, .x, .z(z5), .y(y5));

  gsr_model_monitor #(.K(3), .F(R3_TABLE), .FEEDBACK(0)) m_k3 (.clk, .rst_n, .x, .z(z3), .y(y3), .checks(c[0]), .failures(f[0]));
  gsr_model_monitor #(.K(1), .F(T1), .FEEDBACK(0)) m_k1 (.clk, .rst_n, .x, .z(z1), .y(y1), .checks(c[1]), .failures(f[1]));
  gsr_model_monitor #(.K(2), .F(T2), .FEEDBACK(0)) m_k2 (.clk, .rst_n, .x, .z(z2), .y(y2), .checks(c[2]), .failures(f[2]));
  gsr_model_monitor #(.K(4), .F(T4), .FEEDBACK(0)) m_k4 (.clk, .rst_n, .x, .z(z4), .y(y4), .checks(c[3]), .failures(f[3]));
  gsr_model_monitor #(.K(5), .F(T5), .FEEDBACK(0)) m_k5 (.clk, .rst_n, .x, .z(z5), .y(y5), .checks(c[4]), .failures(f[4]));
  sr_delay_monitor #(.K(3), .EXPECT_SR(1'b1)) s_k3s (.clk, .en(rst_n), .x, .z(z3s), .checks(c[5]), .failures(f[5]), .deviations(dummy[0]));
  sr_delay_monitor #(.K(3), .EXPECT_SR(1'b0)) s_k3 (.clk, .en(rst_n), .x, .z(z3), .checks(dummy[1]), .failures(d[1]), .deviations(d[0]));

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if ({y3, y3s, y1, y2, y4, y5} != '0) begin
      failures++;
      $display("FAIL: reset does not clear the stages");
    end
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
    if (d[0] == 0) begin
      failures++;
      $display("FAIL: default instance never deviated from a shift register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
