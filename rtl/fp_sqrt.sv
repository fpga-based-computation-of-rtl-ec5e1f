// fp_sqrt: pipelined binary32 square root, y = sqrt(a), one result per
// clock, latency fp_pkg::LAT_SQRT = 16 cycles.
//
// The exponent is made even by doubling the mantissa when needed, then a
// digit-by-digit (restoring) integer square root of the 50-bit scaled
// radicand gives 25 root bits, two per pipeline stage over 13 stages. A
// 14th stage rounds to nearest-even (remainder as sticky) and packs, and two
// output registers bring the latency to 16, the value that lines the
// var1 path of the accumulation-value stage up with its printed 14-entry
// buffer. Stage split and latency are this implementation's choice.
// Negative inputs give NaN, zero and subnormals give zero.
module fp_sqrt
  import fp_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  output fp32_t y
);

  localparam int STAGES = 13;
  localparam int PAD    = LAT_SQRT - STAGES - 1;

  typedef struct packed {
    logic [49:0] rad;   // radicand bits still to be consumed, MSBs first
    logic [27:0] rem;   // partial remainder
    logic [24:0] root;  // root bits so far
    logic signed [11:0] e;
    logic        zero;
    logic        nan;
  } sq_st_t;

  function automatic sq_st_t sq_step(input sq_st_t x);
    sq_st_t o;
    logic [27:0] trial;
    o = x;
    o.rem = {o.rem[25:0], o.rad[49:48]};
    o.rad = o.rad << 2;
    trial = {1'b0, o.root, 2'b01};
    if (o.rem >= trial) begin
      o.rem  = o.rem - trial;
      o.root = {o.root[23:0], 1'b1};
    end else begin
      o.root = {o.root[23:0], 1'b0};
    end
    return o;
  endfunction

  sq_st_t st0;
  sq_st_t st [1:STAGES];

  always_comb begin
    logic signed [11:0] ue;     // unbiased exponent
    logic [24:0] m;             // mantissa with 23 fraction bits, in [1,4)
    ue = 12'($signed({4'd0, a[30:23]})) - 12'sd127;
    if (ue[0]) begin
      m  = {1'b0, 1'b1, a[22:0]} << 1;
      ue = ue - 12'sd1;
    end else begin
      m  = {1'b0, 1'b1, a[22:0]};
    end
    st0.rad  = {m, 25'd0};
    st0.rem  = '0;
    st0.root = '0;
    st0.e    = (ue >>> 1) + 12'sd127;
    st0.zero = (a[30:23] == 0);
    st0.nan  = a[31] && (a[30:23] != 0);
  end

  always_ff @(posedge clk) begin
    st[1] <= sq_step(sq_step(st0));
    for (int k = 2; k < STAGES; k++)
      st[k] <= sq_step(sq_step(st[k-1]));
    st[STAGES] <= sq_step(st[STAGES-1]);   // 25th and last root bit
  end

  fp32_t r;
  always_ff @(posedge clk) begin
    sq_st_t f;
    f = st[STAGES];
    if (f.nan)       r <= FP_NAN;
    else if (f.zero) r <= FP_ZERO;
    else             r <= round_pack(1'b0, f.e, {f.root, |f.rem, 1'b0});
  end

  delay_line #(.WIDTH(32), .DEPTH(PAD)) u_pad (.clk(clk), .d(r), .q(y));

endmodule
