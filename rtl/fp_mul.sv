// fp_mul: pipelined binary32 multiplier, y = a * b, one result per clock,
// latency fp_pkg::LAT_MUL = 2 cycles (this implementation's choice).
// Stage 1 forms the 48-bit mantissa product and the exponent sum, stage 2
// normalises by at most one place, rounds to nearest-even and packs.
// Subnormal inputs are read as zero; no NaN propagation.
module fp_mul
  import fp_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        s1_sign, s1_zero;
  logic signed [11:0] s1_e;
  logic [47:0] s1_p;

  always_ff @(posedge clk) begin
    s1_sign <= a[31] ^ b[31];
    s1_zero <= (a[30:23] == 0) || (b[30:23] == 0);
    s1_e    <= 12'($signed({4'd0, a[30:23]})) + 12'($signed({4'd0, b[30:23]})) - 12'sd127;
    s1_p    <= {1'b1, a[22:0]} * {1'b1, b[22:0]};
  end

  always_ff @(posedge clk) begin
    if (s1_zero)
      y <= {s1_sign, 31'd0};
    else if (s1_p[47])
      y <= round_pack(s1_sign, s1_e + 12'sd1, {s1_p[47:22], |s1_p[21:0]});
    else
      y <= round_pack(s1_sign, s1_e, {s1_p[46:21], |s1_p[20:0]});
  end

endmodule
