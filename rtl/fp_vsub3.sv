// fp_vsub3: component-wise difference of two 3-D points, y = a - b, built
// from three fp_add units in subtract mode; latency fp_pkg::LAT_ADD.
module fp_vsub3
  import fp_pkg::*;
(
  input  logic   clk,
  input  point_t a,
  input  point_t b,
  output point_t y
);
  fp_add u_x (.clk(clk), .a(a.x), .b(b.x), .sub(1'b1), .y(y.x));
  fp_add u_y (.clk(clk), .a(a.y), .b(b.y), .sub(1'b1), .y(y.y));
  fp_add u_z (.clk(clk), .a(a.z), .b(b.z), .sub(1'b1), .y(y.z));
endmodule
