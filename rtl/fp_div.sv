// fp_div: pipelined binary32 divider, y = a / b, one result per clock,
// latency fp_pkg::LAT_DIV = 14 cycles.
//
// Restoring division of the mantissas, two quotient bits per pipeline stage:
// 13 stages give 26 quotient bits (one integer bit, enough fraction bits for
// a 24-bit mantissa plus guard bit in both the q >= 1 and q < 1 cases), the
// remainder gives the sticky bit, and a 14th stage normalises, rounds to
// nearest-even and packs. The radix and stage count are this
// implementation's choice. Division by zero gives infinity; subnormal inputs
// are read as zero.
module fp_div
  import fp_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  localparam int STAGES = 13;

  typedef struct packed {
    logic [25:0] r;     // partial remainder, 23 fraction bits
    logic [23:0] d;     // divisor mantissa
    logic [25:0] q;     // quotient bits so far
    logic signed [11:0] e;
    logic        s;
    logic        zero;
    logic        inf;
  } div_st_t;

  function automatic div_st_t div_step(input div_st_t x);
    div_st_t o;
    o = x;
    if (o.r >= {2'b00, o.d}) begin
      o.r = o.r - {2'b00, o.d};
      o.q = {o.q[24:0], 1'b1};
    end else begin
      o.q = {o.q[24:0], 1'b0};
    end
    o.r = o.r << 1;
    return o;
  endfunction

  div_st_t st0;
  div_st_t st [1:STAGES];

  always_comb begin
    st0.r    = (a[30:23] == 0) ? 26'd0 : {3'b001, a[22:0]};
    st0.d    = {1'b1, b[22:0]};
    st0.q    = '0;
    st0.e    = 12'($signed({4'd0, a[30:23]})) - 12'($signed({4'd0, b[30:23]})) + 12'sd127;
    st0.s    = a[31] ^ b[31];
    st0.zero = (a[30:23] == 0);
    st0.inf  = (b[30:23] == 0) && (a[30:23] != 0);
  end

  always_ff @(posedge clk) begin
    st[1] <= div_step(div_step(st0));
    for (int k = 2; k <= STAGES; k++)
      st[k] <= div_step(div_step(st[k-1]));
  end

  always_ff @(posedge clk) begin
    div_st_t f;
    f = st[STAGES];
    if (f.zero)
      y <= {f.s, 31'd0};
    else if (f.inf)
      y <= {f.s, FP_INF[30:0]};
    else if (f.q[25])
      y <= round_pack(f.s, f.e, {f.q[25:0], |f.r});
    else
      y <= round_pack(f.s, f.e - 12'sd1, {f.q[24:0], |f.r, 1'b0});
  end

endmodule
