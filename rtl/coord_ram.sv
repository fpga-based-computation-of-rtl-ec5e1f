// coord_ram: one coordinate memory (X, Y or Z) of the point list, a
// DEPTH x 32-bit block RAM with one write port for the host, which loads
// the coordinates computed in software, and one synchronous read port
// (data one clock after the address) for the pipeline interface. The
// design uses three of them, one per coordinate, read at the same address.
// Depth and port arrangement are this implementation's choice; the default
// of 2048 holds the largest coil evaluated (1,920 points).
module coord_ram #(
  parameter int DEPTH = 2048,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
