// tb_var_gen: drives var_gen with one random work item per clock (segment
// end points within a 60 mm cube, random sub-point index, random bubbles in
// the valid flag) and checks var1..var5, each at its own arrival time
// (V1_AT..V5_AT cycles), against the definitions computed in double
// precision, to a relative tolerance of 2e-5 of the magnitude of the
// operands. Also checks that out_valid and out_last follow in_valid and
// in_last by V2_AT cycles.
module tb_var_gen;
  import fp_pkg::*;
  localparam int SUB = 10;
  localparam int QW  = $clog2(SUB);
  localparam int N   = 3000;
  localparam real R2 = 0.25e-6;       // (0.5 mm)^2

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_last, out_valid, out_last;
  point_t a1, a2, b1, b2;
  logic [QW-1:0] in_q;
  fp32_t v1, v2, v3, v4, v5;
  int checks = 0, failures = 0;

  var_gen #(.SUBPOINTS(SUB)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_last(in_last),
    .a1(a1), .a2(a2), .b1(b1), .b2(b2), .in_q(in_q), .wire_r2(real_to_fp(R2)),
    .out_valid(out_valid), .out_last(out_last),
    .var1(v1), .var2(v2), .var3(v3), .var4(v4), .var5(v5));

  always #5 clk = ~clk;

  real e1 [N], e2 [N], e3 [N], e4 [N], e5 [N], s1 [N], s5 [N];
  bit  ev [N], el [N];

  function automatic real r(input fp32_t f); return fp_to_real(f); endfunction
  function automatic real sq(input real x); return x * x; endfunction

  task automatic chk(input string nm, input fp32_t got, input real expv, input real scale);
    real d;
    d = r(got) - expv;
    if (d < 0.0) d = -d;
    checks++;
    if (d > 2.0e-5 * scale + 1.0e-30) begin
      failures++;
      if (failures < 10) $display("%s: got %g expected %g", nm, r(got), expv);
    end
  endtask

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; in_last = 1'b0; in_q = '0;
    a1 = '0; a2 = '0; b1 = '0; b2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N + V3_AT; t++) begin
      @(negedge clk);
      if (t < N) begin
        real p [12];
        real dax, day, daz, dbx, dby, dbz, px, py, pz, c, lb;
        foreach (p[k]) p[k] = 0.06 * real'($urandom % 100000) / 100000.0 - 0.03;
        a1 = '{real_to_fp(p[0]), real_to_fp(p[1]), real_to_fp(p[2])};
        a2 = '{real_to_fp(p[3]), real_to_fp(p[4]), real_to_fp(p[5])};
        b1 = '{real_to_fp(p[6]), real_to_fp(p[7]), real_to_fp(p[8])};
        b2 = '{real_to_fp(p[9]), real_to_fp(p[10]), real_to_fp(p[11])};
        if (t % 5 == 0) b1 = a1;            // touching segments
        if (t % 7 == 0) begin b1 = a1; b2 = a2; end   // self pair
        in_q = QW'($urandom % SUB);
        in_valid = ($urandom % 4) != 0;
        in_last  = ($urandom % 8) == 0;
        ev[t] = in_valid; el[t] = in_valid & in_last;
        dax = r(a2.x) - r(a1.x); day = r(a2.y) - r(a1.y); daz = r(a2.z) - r(a1.z);
        dbx = r(b2.x) - r(b1.x); dby = r(b2.y) - r(b1.y); dbz = r(b2.z) - r(b1.z);
        c  = (real'(in_q) + 0.5) / real'(SUB);
        px = r(a1.x) + c * dax; py = r(a1.y) + c * day; pz = r(a1.z) + c * daz;
        lb = $sqrt(sq(dbx) + sq(dby) + sq(dbz));
        e1[t] = (dax * dbx + day * dby + daz * dbz) / real'(SUB);
        s1[t] = $sqrt(sq(dax) + sq(day) + sq(daz)) * lb / real'(SUB);
        e2[t] = lb;
        e3[t] = $sqrt(sq(px - r(b2.x)) + sq(py - r(b2.y)) + sq(pz - r(b2.z)) + R2);
        e4[t] = $sqrt(sq(px - r(b1.x)) + sq(py - r(b1.y)) + sq(pz - r(b1.z)) + R2);
        e5[t] = (px - r(b1.x)) * dbx + (py - r(b1.y)) * dby + (pz - r(b1.z)) * dbz;
        s5[t] = e4[t] * lb;
      end else begin
        in_valid = 1'b0;
        in_last  = 1'b0;
      end
      @(posedge clk); #1;
      begin
        int k;
        k = t + 1 - V1_AT; if (k >= 0 && k < N) chk("var1", v1, e1[k], s1[k]);
        k = t + 1 - V5_AT; if (k >= 0 && k < N) chk("var5", v5, e5[k], s5[k]);
        k = t + 1 - V2_AT;
        if (k >= 0 && k < N) begin
          chk("var2", v2, e2[k], e2[k]);
          checks++;
          if (out_valid !== ev[k] || out_last !== el[k]) failures++;
        end
        k = t + 1 - V3_AT;
        if (k >= 0 && k < N) begin
          chk("var3", v3, e3[k], e3[k]);
          chk("var4", v4, e4[k], e4[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
