// delay_line: a chain of DEPTH registers that delays a WIDTH-bit word by
// exactly DEPTH clock cycles (DEPTH = 0 is a plain wire). It has no reset and
// no enable: the design runs every pipeline every cycle and tells valid words
// from stale ones by control bits that travel in the same or a parallel line.
// Used to align operands and control with the floating-point pipelines and to
// hold one step of per-slot state between neighbouring PEs.
module delay_line #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int unsigned k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
    end
    assign q = stage[DEPTH-1];
  end
endmodule
