// tb_accumulator: three runs of the feedback accumulator. Each run pulses
// clear, streams random terms (mixed signs and magnitudes, random bubbles),
// flags the last one, and checks the result against the sum in double
// precision (tolerance: 2^-24 * count * sum of magnitudes), that done
// pulses exactly once, 10 cycles after the last term, and that a run does
// not carry anything over from the previous one.
module tb_accumulator;
  import fp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, in_valid, in_last, done;
  fp32_t x, result;
  int checks = 0, failures = 0;

  accumulator dut (.clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
    .in_last(in_last), .x(x), .done(done), .result(result));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n, input int bubble_pct);
    real sum, mag, tol, d;
    int sent, cyc, done_cyc, dones, last_cyc;
    sum = 0.0; mag = 0.0; sent = 0; cyc = 0; dones = 0; done_cyc = -1; last_cyc = -1;
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    repeat (4) @(negedge clk);
    while (cyc < n * 4 + 40) begin
      if (sent < n && ($urandom % 100) >= bubble_pct) begin
        fp32_t v;
        v = {1'($urandom), 8'(117 + $urandom % 16), 23'($urandom)};
        x = v;
        in_valid = 1'b1;
        in_last  = (sent == n - 1);
        if (in_last) last_cyc = cyc;
        sum += fp_to_real(v);
        mag += fp_to_real({1'b0, v[30:0]});
        sent++;
      end else begin
        x = {1'b0, 8'd130, 23'($urandom)};   // garbage while not valid
        in_valid = 1'b0;
        in_last  = 1'b0;
      end
      @(posedge clk); #1;
      if (done) begin
        dones++;
        done_cyc = cyc;
        d = fp_to_real(result) - sum;
        if (d < 0.0) d = -d;
        tol = (2.0 ** -24) * real'(n) * mag;
        checks++;
        if (d > tol) begin
          failures++;
          $display("n=%0d: got %g expected %g", n, fp_to_real(result), sum);
        end
      end
      cyc++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    checks++;
    if (dones != 1) failures++;
    checks++;
    if (done_cyc - last_cyc != 10) begin
      failures++;
      $display("done %0d cycles after the last term", done_cyc - last_cyc);
    end
    $display("run of %0d terms: result %g, reference %g", n, fp_to_real(result), sum);
  endtask

  initial begin
    clear = 1'b0; in_valid = 1'b0; in_last = 1'b0; x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1000, 0);
    run(777, 30);
    run(5, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
