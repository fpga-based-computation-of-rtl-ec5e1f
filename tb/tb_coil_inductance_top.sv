// tb_coil_inductance_top: end-to-end test of the accelerator at its
// default parameters. It writes circular turns of 64 points through the
// load port, runs the coil and checks
//   * the result against the same sum (all ordered segment pairs, 10
//     sub-points each, wire radius in the distances) evaluated in double
//     precision from the same binary32 points, to 0.5 %;
//   * the run length: 10 * n^2 issue cycles plus the fixed pipeline
//     overhead RUN_OVERHEAD;
//   * that every mechanism occurred: closing segments of a turn, self pairs,
//     cached reference segments (n fetches for n^2 pairs), the lane
//     reduction of the accumulator (one done per run), and a second run
//     after a first without a reset.
// Coils: one turn (64 segments) and two turns one above the other
// (128 segments), radius 25 mm, 2.5 mm apart, wire radius 1 mm.
module tb_coil_inductance_top;
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

  // mechanism counters, sampled at the pipeline interface
  int n_wrap = 0, n_self = 0, n_done = 0, n_runs = 0;
  always @(posedge clk) begin
    if (dut.it_valid && dut.it_q == '0) begin
      if ((int'(dut.u_if.cj) % PPT) == PPT - 1) n_wrap++;
      if (dut.u_if.ci == dut.u_if.cj) n_self++;
    end
    if (done) n_done++;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real px [2048], py [2048], pz [2048];

  task automatic load_turns(input int turns);
    for (int t = 0; t < turns; t++)
      for (int k = 0; k < PPT; k++) begin
        int idx;
        real ang;
        idx = t * PPT + k;
        ang = 2.0 * PI * real'(k) / real'(PPT);
        @(negedge clk);
        wr_en   = 1'b1;
        wr_addr = AW'(idx);
        wr_x    = real_to_fp(0.025 * $cos(ang));
        wr_y    = real_to_fp(0.025 * $sin(ang));
        wr_z    = real_to_fp(0.0025 * real'(t));
        px[idx] = fp_to_real(wr_x);
        py[idx] = fp_to_real(wr_y);
        pz[idx] = fp_to_real(wr_z);
      end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  function automatic int nxt(input int k);
    return (k % PPT == PPT - 1) ? k - (PPT - 1) : k + 1;
  endfunction

  function automatic real reference(input int n);
    real s;
    s = 0.0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        real dax, day, daz, dbx, dby, dbz, lb, v1, v5, v3, v4;
        dax = px[nxt(i)] - px[i]; day = py[nxt(i)] - py[i]; daz = pz[nxt(i)] - pz[i];
        dbx = px[nxt(j)] - px[j]; dby = py[nxt(j)] - py[j]; dbz = pz[nxt(j)] - pz[j];
        lb = $sqrt(dbx * dbx + dby * dby + dbz * dbz);
        v1 = (dax * dbx + day * dby + daz * dbz) / real'(SUB);
        for (int q = 0; q < SUB; q++) begin
          real c, x, y, z, d1x, d1y, d1z;
          c = (real'(q) + 0.5) / real'(SUB);
          x = px[i] + c * dax; y = py[i] + c * day; z = pz[i] + c * daz;
          d1x = x - px[j]; d1y = y - py[j]; d1z = z - pz[j];
          v5 = d1x * dbx + d1y * dby + d1z * dbz;
          v4 = $sqrt(d1x * d1x + d1y * d1y + d1z * d1z + WIRE_R * WIRE_R);
          v3 = $sqrt((x - px[nxt(j)]) ** 2 + (y - py[nxt(j)]) ** 2 + (z - pz[nxt(j)]) ** 2
                     + WIRE_R * WIRE_R);
          s += v1 / lb * $ln((v3 + lb - v5 / lb) / (v4 - v5 / lb));
        end
      end
    return s;
  endfunction

  task automatic run(input int turns);
    int n, dones0;
    real refv, err;
    n = turns * PPT;
    load_turns(turns);
    refv = reference(n);
    dones0 = n_done;
    @(negedge clk);
    n_points = (AW + 1)'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    n_runs++;
    err = (fp_to_real(result) - refv) / refv;
    if (err < 0.0) err = -err;
    checks++;
    if (err > 5.0e-3) begin
      failures++;
      $display("n=%0d: result %g, reference %g", n, fp_to_real(result), refv);
    end
    checks++;
    if (int'(cycles) != SUB * n * n + dut.RUN_OVERHEAD) begin
      failures++;
      $display("n=%0d: %0d cycles, expected %0d", n, cycles, SUB * n * n + dut.RUN_OVERHEAD);
    end
    checks++;
    if (int'(a_fetches) != n) failures++;
    repeat (3) @(negedge clk);
    checks++;
    if (n_done - dones0 != 1 || busy) failures++;
    $display("n=%0d: sum %g (reference %g, rel. error %g), L = %g uH, %0d cycles",
             n, fp_to_real(result), refv, err, 0.1 * fp_to_real(result), cycles);
  endtask

  initial begin
    wr_en = 1'b0; wr_addr = '0; wr_x = '0; wr_y = '0; wr_z = '0;
    start = 1'b0; n_points = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1);
    run(2);
    $display("mechanisms: closing segments %0d, self pairs %0d, accumulator reductions %0d, runs %0d",
             n_wrap, n_self, n_done, n_runs);
    checks++; if (n_wrap == 0) failures++;
    checks++; if (n_self == 0) failures++;
    checks++; if (n_done == 0) failures++;
    checks++; if (n_runs < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
