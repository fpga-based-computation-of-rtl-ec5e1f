// fp_dot3: dot product of two 3-D vectors, y = a.x*b.x + a.y*b.y + a.z*b.z.
// Three multipliers feed an adder for the first two products while the
// third product waits in a LAT_ADD-deep buffer, then a second adder adds
// it: latency LAT_MUL + 2*LAT_ADD, one result per clock.
module fp_dot3
  import fp_pkg::*;
(
  input  logic   clk,
  input  point_t a,
  input  point_t b,
  output fp32_t  y
);
  fp32_t px, py, pz, pz_d, sxy;
  fp_mul u_mx (.clk(clk), .a(a.x), .b(b.x), .y(px));
  fp_mul u_my (.clk(clk), .a(a.y), .b(b.y), .y(py));
  fp_mul u_mz (.clk(clk), .a(a.z), .b(b.z), .y(pz));
  fp_add u_axy (.clk(clk), .a(px), .b(py), .sub(1'b0), .y(sxy));
  delay_line #(.WIDTH(32), .DEPTH(LAT_ADD)) u_dz (.clk(clk), .d(pz), .q(pz_d));
  fp_add u_axyz (.clk(clk), .a(sxy), .b(pz_d), .sub(1'b0), .y(y));
endmodule
