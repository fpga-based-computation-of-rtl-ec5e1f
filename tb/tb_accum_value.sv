// tb_accum_value: feeds accum_value with var1..var5 taken from random
// segment pairs (one item per clock, random bubbles), each value presented
// at the offset var_gen produces it (var5 16 and var1 14 cycles ahead of
// var2, var3 and var4 3 cycles after), and checks each term, AV_LAT = 45
// cycles after its var2, against
//   var1/var2 * ln((var3 + var2 - var5/var2) / (var4 - var5/var2))
// evaluated in double precision from the same binary32 inputs. The
// tolerance is a first-order bound on binary32 rounding: a few units of
// 2^-24 relative in the numerator and denominator, amplified by the
// cancellation in each, plus 1e-5 relative.
module tb_accum_value;
  import fp_pkg::*;
  localparam int N  = 3000;
  localparam int PRE = 20;            // items are indexed from PRE so early offsets exist
  localparam real R2 = 0.25e-6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_last, out_valid, out_last;
  fp32_t v1, v2, v3, v4, v5, term;
  int checks = 0, failures = 0;

  accum_value dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_last(in_last),
    .var1(v1), .var2(v2), .var3(v3), .var4(v4), .var5(v5),
    .out_valid(out_valid), .out_last(out_last), .term(term));

  always #5 clk = ~clk;

  fp32_t f1 [N], f2 [N], f3 [N], f4 [N], f5 [N];
  real   et [N], sc [N];
  bit    ev [N], el [N];

  function automatic real r(input fp32_t f); return fp_to_real(f); endfunction
  function automatic real rabs(input real x); return x < 0.0 ? -x : x; endfunction
  function automatic real sq(input real x); return x * x; endfunction
  function automatic fp32_t pick(input fp32_t arr [N], input int k);
    return (k >= 0 && k < N) ? arr[k] : 32'h3F80_0000;
  endfunction

  initial begin
    repeat (N + 400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // build the items from random geometry
    for (int k = 0; k < N; k++) begin
      real a1 [3], da [3], b1 [3], db [3], p [3], d1 [3], d2 [3];
      real dot_ab, dot_bb, dot_1b, n1, n2, q1, q5, lg, num, den;
      for (int c = 0; c < 3; c++) begin
        a1[c] = 0.05 * real'($urandom % 100000) / 100000.0;
        da[c] = 0.004 * real'($urandom % 100000) / 100000.0 - 0.002;
        b1[c] = (k % 6 == 0) ? a1[c] : 0.05 * real'($urandom % 100000) / 100000.0;
        db[c] = (k % 6 == 0) ? da[c] : 0.004 * real'($urandom % 100000) / 100000.0 - 0.002;
        p[c]  = a1[c] + (real'($urandom % 10) + 0.5) / 10.0 * da[c];
        d1[c] = p[c] - b1[c];
        d2[c] = p[c] - b1[c] - db[c];
      end
      dot_ab = da[0] * db[0] + da[1] * db[1] + da[2] * db[2];
      dot_bb = db[0] * db[0] + db[1] * db[1] + db[2] * db[2];
      dot_1b = d1[0] * db[0] + d1[1] * db[1] + d1[2] * db[2];
      n1 = sq(d1[0]) + sq(d1[1]) + sq(d1[2]);
      n2 = sq(d2[0]) + sq(d2[1]) + sq(d2[2]);
      f1[k] = real_to_fp(dot_ab / 10.0);
      f2[k] = real_to_fp($sqrt(dot_bb));
      f3[k] = real_to_fp($sqrt(n2 + R2));
      f4[k] = real_to_fp($sqrt(n1 + R2));
      f5[k] = real_to_fp(dot_1b);
      q1 = r(f1[k]) / r(f2[k]);
      q5 = r(f5[k]) / r(f2[k]);
      num = r(f3[k]) + r(f2[k]) - q5;
      den = r(f4[k]) - q5;
      lg = $ln(num / den);
      et[k] = q1 * lg;
      // first-order rounding-error bound of the binary32 evaluation
      sc[k] = rabs(q1) * (1.0e-5 * rabs(lg) + 4.0 * (2.0 ** -24) *
              ((r(f3[k]) + r(f2[k]) + rabs(q5)) / rabs(num) + (r(f4[k]) + rabs(q5)) / rabs(den)));
      ev[k] = ($urandom % 4) != 0;
      el[k] = ev[k] && (($urandom % 16) == 0);
    end
    in_valid = 1'b0; in_last = 1'b0;
    v1 = '0; v2 = '0; v3 = '0; v4 = '0; v5 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = -PRE; t < N + AV_LAT; t++) begin
      @(negedge clk);
      v2 = pick(f2, t);
      v1 = pick(f1, t + BUF_V1);
      v5 = pick(f5, t + BUF_V5);
      v3 = pick(f3, t - BUF_V2R);
      v4 = pick(f4, t - BUF_V2R);
      in_valid = (t >= 0 && t < N) ? ev[t] : 1'b0;
      in_last  = (t >= 0 && t < N) ? el[t] : 1'b0;
      @(posedge clk); #1;
      begin
        int k;
        real d;
        k = t + 1 - AV_LAT;
        if (k >= 0 && k < N) begin
          d = r(term) - et[k];
          if (d < 0.0) d = -d;
          checks++;
          if (d > sc[k]) begin
            failures++;
            if (failures < 10) $display("term %0d: got %g expected %g", k, r(term), et[k]);
          end
          checks++;
          if (out_valid !== ev[k] || out_last !== el[k]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
