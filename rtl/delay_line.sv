// delay_line: a chain of DEPTH registers ("buffers") that delays a WIDTH-bit
// word by DEPTH clock cycles; DEPTH = 0 is a plain wire. It is the buffer
// used throughout the pipeline to keep operands that take different paths
// aligned in time, as the buffer stacks of the accumulation-value stage do.
// No reset: the contents are data that a valid flag travelling alongside
// qualifies.
module delay_line #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 14
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] buf_q [DEPTH];
    always_ff @(posedge clk) begin
      buf_q[0] <= d;
      for (int i = 1; i < DEPTH; i++)
        buf_q[i] <= buf_q[i-1];
    end
    assign q = buf_q[DEPTH-1];
  end

endmodule
