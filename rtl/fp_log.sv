// fp_log: pipelined binary32 natural logarithm, y = ln(a), one result per
// clock, latency fp_pkg::LAT_LOG = 12 cycles.
//
// With a = m * 2^E (1 <= m < 2), ln(a) = E*ln2 + ln(m). ln(m) is found by
// multiplicative normalisation in fixed point with FB fraction bits: x
// starts at m and, for k = 1..24, is multiplied by (1 + 2^-k) (a shift and
// an add) whenever the product stays <= 2, while the table value
// ln(1 + 2^-k) is added to y. Then ln(m) = ln2 - y - ln(2/x), and the last
// term is taken as (2 - x)/2, whose error is below 2^-48. Three steps are
// done per stage (8 stages); then E*ln2 is added, the magnitude's leading
// one is found, the result is normalised, rounded and packed (4 stages).
// The method, stage split and latency are this implementation's choice; the
// table ln(1 + 2^-k) is computed at elaboration. ln(0) gives -infinity,
// ln of a negative number NaN.
module fp_log
  import fp_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  output fp32_t y
);

  localparam int FB    = 36;            // fraction bits of the fixed point
  localparam int STEPS = 24;
  localparam int PER   = 3;             // steps per stage
  localparam int NST   = STEPS / PER;

  typedef logic [FB+1:0] fx_t;          // x in [1, 2]
  typedef logic signed [FB+9:0] sfx_t;  // signed result, |ln a| < 128

  localparam fx_t TWO = fx_t'(1) << (FB + 1);

  function automatic fx_t ln_const(input real v);
    return fx_t'(longint'(v * (2.0 ** FB) + 0.5));
  endfunction

  typedef fx_t [STEPS:0] ln_tab_t;
  function automatic ln_tab_t ln_table();
    ln_tab_t t;
    t[0] = '0;
    for (int k = 1; k <= STEPS; k++)
      t[k] = ln_const($ln(1.0 + 2.0 ** (-k)));
    return t;
  endfunction
  localparam ln_tab_t LNT = ln_table();

  localparam fx_t LN2 = ln_const($ln(2.0));

  typedef struct packed {
    fx_t x;
    fx_t acc;
    logic signed [8:0] ue;
    logic zero;
    logic nan;
  } lg_st_t;

  function automatic lg_st_t lg_step(input lg_st_t s, input int k);
    lg_st_t o;
    fx_t t;
    o = s;
    t = o.x + (o.x >> k);
    if (t <= TWO) begin
      o.x   = t;
      o.acc = o.acc + LNT[k];
    end
    return o;
  endfunction

  lg_st_t st0;
  lg_st_t st [1:NST];

  always_comb begin
    st0.x    = {2'b01, a[22:0], (FB - 23)'(0)};
    st0.acc  = '0;
    st0.ue   = 9'($signed({1'b0, a[30:23]})) - 9'sd127;
    st0.zero = (a[30:23] == 0);
    st0.nan  = a[31] && (a[30:23] != 0);
  end

  always_ff @(posedge clk) begin
    lg_st_t v;
    v = st0;
    for (int j = 0; j < PER; j++) v = lg_step(v, 1 + j);
    st[1] <= v;
    for (int s = 2; s <= NST; s++) begin
      v = st[s-1];
      for (int j = 0; j < PER; j++) v = lg_step(v, (s - 1) * PER + 1 + j);
      st[s] <= v;
    end
  end

  // combine: E*ln2 + ln2 - acc - (2 - x)/2
  sfx_t c_val;
  logic c_zero, c_nan;
  always_ff @(posedge clk) begin
    lg_st_t f;
    f = st[NST];
    c_val  <= sfx_t'(f.ue) * sfx_t'(LN2) + sfx_t'(LN2) - sfx_t'(f.acc)
              - sfx_t'(fx_t'((TWO - f.x) >> 1));
    c_zero <= f.zero;
    c_nan  <= f.nan;
  end

  // magnitude and leading-one position
  logic [FB+9:0] m_abs;
  logic          m_sign, m_zero, m_nan, m_inf;
  int unsigned   m_lead;
  always_ff @(posedge clk) begin
    logic [FB+9:0] v;
    int unsigned p;
    v = c_val[FB+9] ? (FB+10)'(-c_val) : (FB+10)'(c_val);
    p = 0;
    for (int i = 0; i < FB + 10; i++)
      if (v[i]) p = i;
    m_abs  <= v;
    m_sign <= c_val[FB+9];
    m_lead <= p;
    m_zero <= (v == 0);
    m_nan  <= c_nan;
    m_inf  <= c_zero;
  end

  // normalise
  logic [26:0] n_m;
  logic signed [11:0] n_e;
  logic n_sign, n_zero, n_nan, n_inf;
  always_ff @(posedge clk) begin
    logic [FB+9+27:0] w;
    w = {m_abs, 27'd0} >> m_lead;   // leading one to bit 27
    n_m    <= {w[27:2], |w[1:0]};
    n_e    <= 12'sd127 + 12'(m_lead) - 12'(FB);
    n_sign <= m_sign;
    n_zero <= m_zero;
    n_nan  <= m_nan;
    n_inf  <= m_inf;
  end

  always_ff @(posedge clk) begin
    if (n_nan)       y <= FP_NAN;
    else if (n_inf)  y <= {1'b1, FP_INF[30:0]};
    else if (n_zero) y <= FP_ZERO;
    else             y <= round_pack(n_sign, n_e, n_m);
  end

endmodule
