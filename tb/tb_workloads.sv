// tb_workloads: runs the six evaluated coil configurations through the
// accelerator at its default parameters, one complete run each:
//   1 outer turn (64 segments), 2 outer turns (128), 4 turns with 2 outer
//   and 2 inner (256), Slinky_1 (640), Slinky_2 (1,280), Slinky_3 (1,920).
// Geometry (this testbench's own; only the segment counts and the
// leaf arrangement are given): a leaf is a stack of 5 stages, each with an
// outer turn (radius 25 mm) and an inner turn (22.5 mm), stages 2.5 mm
// apart, 64 points per turn, wire radius 1 mm. Slinky-k has k leaves
// turned about the central leg (the y axis through the origin) at
// i*180/(k-1) degrees, leaf centres 30 mm from it, all with the same
// sense of current in the central leg.
// Each run is checked for its cycle count, 10*n^2 (the count listed for
// the configuration) plus the fixed overhead, and for its result against
// the same sum evaluated in double precision (within 2 %; the single
// precision accumulation of up to 36.9 million terms is the main error).
// The inductance 1e-7 H/m * sum is printed for each configuration.
module tb_workloads;
  import fp_pkg::*;
  localparam int AW  = 11;
  localparam int PPT = 64;
  localparam int SUB = 10;
  localparam real PI = 3.14159265358979323846;
  localparam real WIRE_R = 1.0e-3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en, start, busy, done;
  logic [AW-1:0] wr_addr;
  fp32_t wr_x, wr_y, wr_z, result;
  logic [AW:0] n_points, a_fetches;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  coil_inductance_top dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr),
    .wr_x(wr_x), .wr_y(wr_y), .wr_z(wr_z), .n_points(n_points), .wire_r2(real_to_fp(WIRE_R * WIRE_R)),
    .start(start), .busy(busy), .done(done), .result(result), .cycles(cycles),
    .a_fetches(a_fetches));

  always #5 clk = ~clk;

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real px [2048], py [2048], pz [2048];
  int  npts;

  // one turn: centre distance dc along the leaf axis e1 = (cos t, 0, sin t),
  // radius rad, height h along the leaf normal (-sin t, 0, cos t)
  task automatic add_turn(input real theta, input real dc, input real rad, input real h);
    for (int k = 0; k < PPT; k++) begin
      real phi, u, v;
      phi = 2.0 * PI * real'(k) / real'(PPT);
      u = dc + rad * $cos(phi);
      v = rad * $sin(phi);
      @(negedge clk);
      wr_en   = 1'b1;
      wr_addr = AW'(npts);
      wr_x    = real_to_fp(u * $cos(theta) - h * $sin(theta));
      wr_y    = real_to_fp(v);
      wr_z    = real_to_fp(u * $sin(theta) + h * $cos(theta));
      px[npts] = fp_to_real(wr_x);
      py[npts] = fp_to_real(wr_y);
      pz[npts] = fp_to_real(wr_z);
      npts++;
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic build(input int cfg);
    npts = 0;
    case (cfg)
      0: add_turn(0.0, 0.0, 0.025, 0.0);
      1: for (int s = 0; s < 2; s++) add_turn(0.0, 0.0, 0.025, 0.0025 * real'(s));
      2: for (int s = 0; s < 2; s++) begin
           add_turn(0.0, 0.0, 0.025, 0.0025 * real'(s));
           add_turn(0.0, 0.0, 0.0225, 0.0025 * real'(s));
         end
      default: begin
        int k;
        k = cfg - 2;                      // Slinky_k
        for (int leaf = 0; leaf < k; leaf++) begin
          real th;
          th = (k == 1) ? 0.0 : PI * real'(leaf) / real'(k - 1);
          for (int s = 0; s < 5; s++) begin
            add_turn(th, 0.030, 0.025, 0.0025 * real'(s));
            add_turn(th, 0.030, 0.0225, 0.0025 * real'(s));
          end
        end
      end
    endcase
  endtask

  function automatic int nxt(input int k);
    return (k % PPT == PPT - 1) ? k - (PPT - 1) : k + 1;
  endfunction

  function automatic real reference(input int n);
    real s;
    s = 0.0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        real dax, day, daz, dbx, dby, dbz, lb, v1;
        dax = px[nxt(i)] - px[i]; day = py[nxt(i)] - py[i]; daz = pz[nxt(i)] - pz[i];
        dbx = px[nxt(j)] - px[j]; dby = py[nxt(j)] - py[j]; dbz = pz[nxt(j)] - pz[j];
        lb = $sqrt(dbx * dbx + dby * dby + dbz * dbz);
        v1 = (dax * dbx + day * dby + daz * dbz) / real'(SUB);
        for (int q = 0; q < SUB; q++) begin
          real c, x, y, z, d1x, d1y, d1z, d2x, d2y, d2z, v3, v4, v5;
          c = (real'(q) + 0.5) / real'(SUB);
          x = px[i] + c * dax; y = py[i] + c * day; z = pz[i] + c * daz;
          d1x = x - px[j]; d1y = y - py[j]; d1z = z - pz[j];
          d2x = x - px[nxt(j)]; d2y = y - py[nxt(j)]; d2z = z - pz[nxt(j)];
          v5 = d1x * dbx + d1y * dby + d1z * dbz;
          v4 = $sqrt(d1x * d1x + d1y * d1y + d1z * d1z + WIRE_R * WIRE_R);
          v3 = $sqrt(d2x * d2x + d2y * d2y + d2z * d2z + WIRE_R * WIRE_R);
          s += v1 / lb * $ln((v3 + lb - v5 / lb) / (v4 - v5 / lb));
        end
      end
    return s;
  endfunction

  string names [6] = '{"1 outer turn", "2 outer turns", "4 turns (2 outer, 2 inner)",
                       "Slinky_1", "Slinky_2", "Slinky_3"};
  int    segs  [6] = '{64, 128, 256, 640, 1280, 1920};

  initial begin
    wr_en = 1'b0; wr_addr = '0; wr_x = '0; wr_y = '0; wr_z = '0;
    start = 1'b0; n_points = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cfg = 0; cfg < 6; cfg++) begin
      real refv, err;
      build(cfg);
      checks++;
      if (npts != segs[cfg]) failures++;
      refv = reference(npts);
      @(negedge clk);
      n_points = (AW + 1)'(npts);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      err = (fp_to_real(result) - refv) / refv;
      if (err < 0.0) err = -err;
      checks++;
      if (err > 0.02) failures++;
      checks++;
      if (int'(cycles) != SUB * npts * npts + dut.RUN_OVERHEAD) failures++;
      $display("%-28s %5d segments: L = %8.4f uH (double-precision reference %8.4f uH, rel. diff %.2e), %0d cycles = %0d + %0d",
               names[cfg], npts, 0.1 * fp_to_real(result), 0.1 * refv, err, cycles,
               SUB * npts * npts, dut.RUN_OVERHEAD);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
