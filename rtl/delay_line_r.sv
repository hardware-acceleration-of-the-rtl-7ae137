// delay_line_r: a chain of DEPTH registers delaying a WIDTH-bit word by
// DEPTH cycles, like delay_line, but cleared to zero by a synchronous
// active-low reset. Used where the delayed word carries valid bits (control
// words between PEs, result valid flags) so that nothing stale appears
// valid after reset.
module delay_line_r #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int unsigned k = 0; k < DEPTH; k++) stage[k] <= '0;
      end else begin
        stage[0] <= d;
        for (int unsigned k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
      end
    end
    assign q = stage[DEPTH-1];
  end
endmodule
