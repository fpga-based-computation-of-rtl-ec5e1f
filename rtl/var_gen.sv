// var_gen: first pipeline stage. From one work item (reference segment
// A1->A2, other segment B1->B2, sub-point index q) it forms the five
// intermediate values of the accumulation formula
//
//   term = var1/var2 * ln( (var3 + var2 - var5/var2) / (var4 - var5/var2) )
//
// which is the contribution of one piece of segment A to the Neumann
// double integral: the piece of length |A|/SUBPOINTS centred on the point
// P = A1 + (q + 1/2)/SUBPOINTS * (A2 - A1), integrated analytically along
// segment B. With da = A2-A1, db = B2-B1, d1 = P-B1, d2 = P-B2 and the
// squared wire radius r2 (which keeps the self term of a segment finite):
//
//   var1 = (da . db) / SUBPOINTS      var2 = |db|
//   var3 = sqrt(|d2|^2 + r2)          var4 = sqrt(|d1|^2 + r2)
//   var5 = d1 . db
//
// The document names var1..var5, the operations and the three square
// roots; these definitions are this implementation's reading of them (the
// closed-form line integral of 1/r along B, which has exactly that form).
//
// Fully pipelined, one item per clock. The values leave at their natural
// times (fp_pkg V1_AT..V5_AT cycles after the item enters): var5 at 19,
// var1 at 21, var2 at 35 together with out_valid/out_last, var3 and var4
// at 38. The accumulation-value stage re-aligns them with its buffers.
module var_gen
  import fp_pkg::*;
#(
  parameter int SUBPOINTS = 10,
  parameter int QW        = $clog2(SUBPOINTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_last,
  input  point_t        a1,
  input  point_t        a2,
  input  point_t        b1,
  input  point_t        b2,
  input  logic [QW-1:0] in_q,
  input  fp32_t         wire_r2,
  output logic          out_valid,   // with var2
  output logic          out_last,
  output fp32_t         var1,
  output fp32_t         var2,
  output fp32_t         var3,
  output fp32_t         var4,
  output fp32_t         var5
);

  // sub-point positions (q + 1/2) / SUBPOINTS and the piece length factor
  typedef logic [SUBPOINTS-1:0][31:0] cq_tab_t;
  function automatic cq_tab_t cq_table();
    cq_tab_t t;
    for (int i = 0; i < SUBPOINTS; i++)
      t[i] = real_to_fp((real'(i) + 0.5) / real'(SUBPOINTS));
    return t;
  endfunction
  localparam cq_tab_t CQ      = cq_table();
  localparam fp32_t   INV_SUB = real_to_fp(1.0 / real'(SUBPOINTS));

  // ---- segment vectors (ready at T_DELTA)
  point_t da, db;
  fp_vsub3 u_da (.clk(clk), .a(a2), .b(a1), .y(da));
  fp_vsub3 u_db (.clk(clk), .a(b2), .b(b1), .y(db));

  // ---- sub-point P = A1 + cq * da (ready at T_POINT)
  fp32_t cq_in, cq_d;
  assign cq_in = CQ[in_q];
  delay_line #(.WIDTH(32), .DEPTH(T_DELTA)) u_dcq (.clk(clk), .d(cq_in), .q(cq_d));

  point_t sda, a1_d, p;
  fp_mul u_sx (.clk(clk), .a(cq_d), .b(da.x), .y(sda.x));
  fp_mul u_sy (.clk(clk), .a(cq_d), .b(da.y), .y(sda.y));
  fp_mul u_sz (.clk(clk), .a(cq_d), .b(da.z), .y(sda.z));
  delay_line #(.WIDTH(96), .DEPTH(T_DELTA + LAT_MUL)) u_da1 (.clk(clk), .d(a1), .q(a1_d));
  fp_add u_px (.clk(clk), .a(a1_d.x), .b(sda.x), .sub(1'b0), .y(p.x));
  fp_add u_py (.clk(clk), .a(a1_d.y), .b(sda.y), .sub(1'b0), .y(p.y));
  fp_add u_pz (.clk(clk), .a(a1_d.z), .b(sda.z), .sub(1'b0), .y(p.z));

  // ---- distances from P to the ends of B (ready at T_DIFF)
  point_t b1_d, b2_d, d1, d2;
  delay_line #(.WIDTH(96), .DEPTH(T_POINT)) u_db1 (.clk(clk), .d(b1), .q(b1_d));
  delay_line #(.WIDTH(96), .DEPTH(T_POINT)) u_db2 (.clk(clk), .d(b2), .q(b2_d));
  fp_vsub3 u_d1 (.clk(clk), .a(p), .b(b1_d), .y(d1));
  fp_vsub3 u_d2 (.clk(clk), .a(p), .b(b2_d), .y(d2));

  // ---- dot products (ready at T_DOT)
  point_t da_d, db_d;
  delay_line #(.WIDTH(96), .DEPTH(T_DIFF - T_DELTA)) u_dda (.clk(clk), .d(da), .q(da_d));
  delay_line #(.WIDTH(96), .DEPTH(T_DIFF - T_DELTA)) u_ddb (.clk(clk), .d(db), .q(db_d));

  fp32_t dot_ab, dot_bb, dot_1b, dot_11, dot_22;
  fp_dot3 u_ab (.clk(clk), .a(da_d), .b(db_d), .y(dot_ab));
  fp_dot3 u_bb (.clk(clk), .a(db_d), .b(db_d), .y(dot_bb));
  fp_dot3 u_1b (.clk(clk), .a(d1),   .b(db_d), .y(dot_1b));
  fp_dot3 u_11 (.clk(clk), .a(d1),   .b(d1),   .y(dot_11));
  fp_dot3 u_22 (.clk(clk), .a(d2),   .b(d2),   .y(dot_22));

  // ---- the five values
  fp_mul u_v1 (.clk(clk), .a(dot_ab), .b(INV_SUB), .y(var1));
  assign var5 = dot_1b;
  fp_sqrt u_v2 (.clk(clk), .a(dot_bb), .y(var2));

  fp32_t r22, r11;
  fp_add u_r2 (.clk(clk), .a(dot_22), .b(wire_r2), .sub(1'b0), .y(r22));
  fp_add u_r1 (.clk(clk), .a(dot_11), .b(wire_r2), .sub(1'b0), .y(r11));
  fp_sqrt u_v3 (.clk(clk), .a(r22), .y(var3));
  fp_sqrt u_v4 (.clk(clk), .a(r11), .y(var4));

  // ---- valid / last travel with the item
  logic [V2_AT-1:0] vld_sr, last_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_sr  <= '0;
      last_sr <= '0;
    end else begin
      vld_sr  <= {vld_sr[V2_AT-2:0], in_valid};
      last_sr <= {last_sr[V2_AT-2:0], in_valid & in_last};
    end
  end
  assign out_valid = vld_sr[V2_AT-1];
  assign out_last  = last_sr[V2_AT-1];

endmodule
