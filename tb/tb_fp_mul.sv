// tb_fp_mul: self-checking testbench of fp_mul (a * b).
// Feeds one random binary32 operand set per clock (magnitudes 2^-20..2^20,
// plus a few special cases) and checks every result, exactly LAT cycles
// after its operands, against the value computed in double precision and
// rounded to binary32, allowing 1 unit(s) in the last place.
module tb_fp_mul;
  import fp_pkg::*;

  localparam int LAT = LAT_MUL;
  localparam int N   = 4000;
  localparam real ABS_TOL = 0.0;  // absolute tolerance near a zero result

  function automatic real fp_abs_diff(input fp32_t p, input fp32_t q);
    real d;
    d = fp_to_real(p) - fp_to_real(q);
    return d < 0.0 ? -d : d;
  endfunction

  logic  clk = 1'b0;
  fp32_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;
  fp32_t exp_q [$];
  int    cyc = 0;

  fp_mul dut (.clk(clk), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  function automatic fp32_t rnd_fp(input bit pos);
    fp32_t f;
    f[31]    = pos ? 1'b0 : 1'($urandom);
    f[30:23] = 8'(107 + ($urandom % 41));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  function automatic int ulp_diff(input fp32_t p, input fp32_t q);
    int d;
    if (p[30:0] == 0 && q[30:0] == 0) return 0;
    if (p[31] != q[31]) return 1 << 30;
    d = int'(p[30:0]) - int'(q[30:0]);
    return d < 0 ? -d : d;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb;
    a = FP_ZERO; b = 32'h3F80_0000; sub = 1'b0;
    for (int i = 0; i < N + LAT - 1; i++) begin
      @(negedge clk);
      if (i < N) begin
        a = rnd_fp(0);
        b = rnd_fp(0);
        
        if (i == 1) b = a;                       // equal operands
        if (i == 2) a = 32'h3F80_0000;           // 1.0
        if (i == 3) a = 32'h4000_0000;           // 2.0
        ra = fp_to_real(a);
        rb = fp_to_real(b);
        exp_q.push_back(real_to_fp(ra * rb));
      end
      @(posedge clk); #1;
      if (i >= LAT - 1) begin
        fp32_t e;
        e = exp_q.pop_front();
        checks++;
        if (ulp_diff(y, e) > 1 && fp_abs_diff(y, e) > ABS_TOL) begin
          failures++;
          if (failures < 10)
            $display("mismatch item %0d: got %h expected %h", i + 1 - LAT, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
