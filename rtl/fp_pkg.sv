// fp_pkg: shared types, operator latencies and helper functions of the
// inductance pipeline.
//
// Numbers are IEEE-754 binary32 (8-bit exponent, 23-bit stored mantissa),
// the "single precision" the pipeline is built around. Subnormals are
// flushed to zero, results round to nearest-even, overflow gives infinity.
// The operator latencies below are the ones the operator modules implement;
// the adder's three cycles follow the floating-point library the design is
// modelled on, the others are this implementation's choice, picked so that
// the delay buffers of the accumulation-value stage come out at 14 and 29
// entries. round_pack() is the common normalise-and-round step; the real
// conversion helpers are for constants and testbenches only.
package fp_pkg;

  typedef logic [31:0] fp32_t;

  // one point of the coil (metres)
  typedef struct packed {
    fp32_t x;
    fp32_t y;
    fp32_t z;
  } point_t;

  localparam int LAT_ADD  = 3;
  localparam int LAT_MUL  = 2;
  localparam int LAT_DIV  = 14;
  localparam int LAT_SQRT = 16;
  localparam int LAT_LOG  = 12;

  // Arrival times, in cycles after a work item enters var_gen, of the five
  // intermediate values of the accumulation formula. var_gen's valid flag
  // comes with var2 (V2_AT); var1 and var5 come earlier, var3 and var4 later.
  localparam int T_DELTA = LAT_ADD;                      // A2-A1, B2-B1
  localparam int T_POINT = 2 * LAT_ADD + LAT_MUL;        // sub-point P
  localparam int T_DIFF  = 3 * LAT_ADD + LAT_MUL;        // P-B1, P-B2
  localparam int T_DOT   = T_DIFF + LAT_MUL + 2 * LAT_ADD;
  localparam int V1_AT   = T_DOT + LAT_MUL;
  localparam int V5_AT   = T_DOT;
  localparam int V2_AT   = T_DOT + LAT_SQRT;
  localparam int V3_AT   = T_DOT + LAT_ADD + LAT_SQRT;
  localparam int V4_AT   = V3_AT;

  // Buffer depths of the accumulation-value stage, measured from the time
  // var2 arrives. BUF_V1 and BUF_Q1 come out at 14 and 29.
  localparam int BUF_V1  = V2_AT - V1_AT;
  localparam int BUF_V5  = V2_AT - V5_AT;
  localparam int BUF_V4  = LAT_DIV - (V4_AT - V2_AT);
  localparam int BUF_V2R = V3_AT - V2_AT;
  localparam int BUF_SUM = LAT_DIV - (V3_AT - V2_AT) - LAT_ADD;
  localparam int BUF_Q1  = LAT_ADD + LAT_DIV + LAT_LOG;
  localparam int AV_LAT  = 2 * LAT_DIV + LAT_ADD + LAT_LOG + LAT_MUL;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_INF  = 32'h7F80_0000;
  localparam fp32_t FP_NAN  = 32'h7FC0_0000;

  // Round a normalised mantissa and pack it. m[26] is the leading one,
  // m[25:3] the stored fraction, m[2] the guard bit and m[1:0] sticky bits.
  // e is the biased exponent belonging to m[26].
  function automatic fp32_t round_pack(input logic s, input logic signed [11:0] e,
                                       input logic [26:0] m);
    logic [24:0] mr;
    logic signed [11:0] er;
    logic inc;
    inc = m[2] & ((|m[1:0]) | m[3]);
    mr  = {1'b0, m[26:3]} + 25'(inc);
    er  = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 12'sd1;
    end
    if (er <= 0)        return {s, 31'd0};
    else if (er >= 255) return {s, FP_INF[30:0]};
    else                return {s, er[7:0], mr[22:0]};
  endfunction

  // real -> binary32 (round to nearest), for constants and testbenches
  function automatic fp32_t real_to_fp(input real r);
    logic [63:0] d;
    logic signed [11:0] e;
    logic [26:0] m;
    d = $realtobits(r);
    if (d[62:52] == 0) return {d[63], 31'd0};
    e = 12'($signed({1'b0, d[62:52]})) - 12'sd1023 + 12'sd127;
    m = {1'b1, d[51:27], |d[26:0]};
    return round_pack(d[63], e, m);
  endfunction

  // binary32 -> real, for testbenches
  function automatic real fp_to_real(input fp32_t f);
    logic [63:0] d;
    if (f[30:23] == 0) return 0.0;
    d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

endpackage
