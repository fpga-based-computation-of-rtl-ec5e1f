// fp_add: pipelined binary32 adder/subtractor, y = a + b (sub=0) or a - b
// (sub=1), one result per clock, latency fp_pkg::LAT_ADD = 3 cycles.
//
// The three-cycle latency is the one of the library adders the design is
// modelled on; the split into stages is this implementation's own:
//   1. unpack, order the operands by magnitude, align the smaller one
//      (guard and sticky bits kept);
//   2. add or subtract the aligned mantissas;
//   3. normalise (carry out or leading zeros), round to nearest-even, pack.
// Subnormal inputs are read as zero; no NaN propagation.
module fp_add
  import fp_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  // ---- stage 1: order and align
  logic        s1_sign, s1_diff;
  logic [7:0]  s1_e;
  logic [26:0] s1_big, s1_small;

  always_ff @(posedge clk) begin
    logic        sa, sb, swap;
    logic [7:0]  ea, eb, d;
    logic [23:0] ma, mb;
    logic [26:0] sm;
    logic        sticky;
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 0) ? 24'd0 : {1'b1, b[22:0]};
    swap = {eb, mb} > {ea, ma};
    if (swap) begin
      {ea, eb} = {eb, ea};
      {ma, mb} = {mb, ma};
      {sa, sb} = {sb, sa};
    end
    d = ea - eb;
    sm = {mb, 3'b000};
    if (d >= 8'd27) begin
      sticky = |mb;
      sm     = 27'd0;
    end else begin
      sticky = 1'b0;
      for (int i = 0; i < 27; i++)
        if (i < int'(d) && sm[i]) sticky = 1'b1;
      sm = sm >> d;
    end
    s1_sign  <= sa;
    s1_diff  <= sa ^ sb;
    s1_e     <= ea;
    s1_big   <= {ma, 3'b000};
    s1_small <= {sm[26:1], sm[0] | sticky};
  end

  // ---- stage 2: add or subtract
  logic        s2_sign;
  logic [7:0]  s2_e;
  logic [27:0] s2_sum;

  always_ff @(posedge clk) begin
    s2_sign <= s1_sign;
    s2_e    <= s1_e;
    s2_sum  <= s1_diff ? ({1'b0, s1_big} - {1'b0, s1_small})
                       : ({1'b0, s1_big} + {1'b0, s1_small});
  end

  // ---- stage 3: normalise, round, pack
  always_ff @(posedge clk) begin
    logic [26:0] m;
    logic signed [11:0] e;
    int lz;
    if (s2_sum == 0) begin
      y <= FP_ZERO;
    end else if (s2_sum[27]) begin
      m = {s2_sum[27:2], s2_sum[1] | s2_sum[0]};
      e = 12'($signed({4'd0, s2_e})) + 12'sd1;
      y <= round_pack(s2_sign, e, m);
    end else begin
      lz = 0;
      for (int i = 0; i < 27; i++)
        if (s2_sum[26-i] == 1'b0 && lz == i) lz = i + 1;
      m = s2_sum[26:0] << lz;
      e = 12'($signed({4'd0, s2_e})) - 12'(lz);
      y <= round_pack(s2_sign, e, m);
    end
  end

endmodule
