// accum_value: second pipeline stage, the "accumulation value" datapath.
// It evaluates
//
//   term = var1/var2 * ln( (var3 + var2 - var5/var2) / (var4 - var5/var2) )
//
// with the operator network of the document's stage diagram: two dividers
// form var1/var2 and var5/var2 side by side, one subtractor forms the
// denominator var4 - var5/var2, an adder and a second subtractor the
// numerator (var2 + var3) - var5/var2, a third divider their ratio, then
// the logarithm and a final multiplier. Delay buffers keep the operands in
// step: var1 waits BUF_V1 = 14 cycles before its divider and var1/var2
// waits BUF_Q1 = 29 cycles for the logarithm, the two depths printed in the
// diagram. The depths of the other buffers (var5, var4, var2) follow from
// the operator latencies in fp_pkg. The buffer after the var2 + var3 adder
// is not in the diagram; these latencies need it to keep the numerator
// aligned with var5/var2.
//
// Timing: the inputs come at var_gen's offsets (var5 16 and var1 14 cycles
// before var2, var3 and var4 3 cycles after), in_valid/in_last with var2;
// term, out_valid and out_last leave AV_LAT = 45 cycles after var2. One
// term per clock.
module accum_value
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,    // with var2
  input  logic  in_last,
  input  fp32_t var1,
  input  fp32_t var2,
  input  fp32_t var3,
  input  fp32_t var4,
  input  fp32_t var5,
  output logic  out_valid,
  output logic  out_last,
  output fp32_t term
);

  fp32_t v1_d, v5_d, v4_d, v2r_d;
  fp32_t q1, q5, den, s23, s23_d, num, ratio, lg, q1_d;

  delay_line #(.WIDTH(32), .DEPTH(BUF_V1)) u_b1 (.clk(clk), .d(var1), .q(v1_d));
  delay_line #(.WIDTH(32), .DEPTH(BUF_V5)) u_b5 (.clk(clk), .d(var5), .q(v5_d));

  fp_div u_q1 (.clk(clk), .a(v1_d), .b(var2), .y(q1));     // var1/var2
  fp_div u_q5 (.clk(clk), .a(v5_d), .b(var2), .y(q5));     // var5/var2

  delay_line #(.WIDTH(32), .DEPTH(BUF_V4)) u_b4 (.clk(clk), .d(var4), .q(v4_d));
  fp_add u_den (.clk(clk), .a(v4_d), .b(q5), .sub(1'b1), .y(den));

  delay_line #(.WIDTH(32), .DEPTH(BUF_V2R)) u_b2 (.clk(clk), .d(var2), .q(v2r_d));
  fp_add u_s23 (.clk(clk), .a(v2r_d), .b(var3), .sub(1'b0), .y(s23));
  delay_line #(.WIDTH(32), .DEPTH(BUF_SUM)) u_bs (.clk(clk), .d(s23), .q(s23_d));
  fp_add u_num (.clk(clk), .a(s23_d), .b(q5), .sub(1'b1), .y(num));

  fp_div u_rat (.clk(clk), .a(num), .b(den), .y(ratio));
  fp_log u_log (.clk(clk), .a(ratio), .y(lg));

  delay_line #(.WIDTH(32), .DEPTH(BUF_Q1)) u_bq (.clk(clk), .d(q1), .q(q1_d));
  fp_mul u_term (.clk(clk), .a(q1_d), .b(lg), .y(term));

  logic [AV_LAT-1:0] vld_sr, last_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_sr  <= '0;
      last_sr <= '0;
    end else begin
      vld_sr  <= {vld_sr[AV_LAT-2:0], in_valid};
      last_sr <= {last_sr[AV_LAT-2:0], in_valid & in_last};
    end
  end
  assign out_valid = vld_sr[AV_LAT-1];
  assign out_last  = last_sr[AV_LAT-1];

endmodule
