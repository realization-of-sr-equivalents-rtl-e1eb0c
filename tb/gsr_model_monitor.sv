// gsr_model_monitor: testbench helper comparing a GSR with a reference model.
//
// Keeps its own copy of the state, stepped on every rising clock edge with the
// clock-by-clock equations of gsr_pkg (gf2sr_next / gfsr_next, a loop over the
// truth-table vector, written independently of the generate structure of the
// RTL), and after every falling edge compares the circuit's state y and output
// z with the model. FEEDBACK selects the GFSR equations.
module gsr_model_monitor #(
  parameter int                  K        = 3,
  parameter logic [2**(K+1)-2:0] F        = '0,
  parameter bit                  FEEDBACK = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x,
  input  logic         z,
  input  logic [K-1:0] y,
  output int           checks,
  output int           failures
);
  localparam gsr_pkg::table_t FT = gsr_pkg::table_t'(F);
  gsr_pkg::state_t ym;
  logic            zm;

  initial begin
    checks = 0;
    failures = 0;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ym <= '0;
    else if (FEEDBACK) ym <= gsr_pkg::gfsr_next(K, FT, x, ym);
    else               ym <= gsr_pkg::gf2sr_next(K, FT, x, ym);
  end

  always @(negedge clk) begin
    #2;
    zm = FEEDBACK ? gsr_pkg::gfsr_out(K, FT, ym) : gsr_pkg::gf2sr_out(K, FT, x, ym);
    checks += 2;
    if (y != ym[K-1:0]) begin
      failures++;
      if (failures <= 5) $display("FAIL %m: state %b, model %b", y, ym[K-1:0]);
    end
    if (z != zm) begin
      failures++;
      if (failures <= 5) $display("FAIL %m: z %b, model %b", z, zm);
    end
  end
endmodule
