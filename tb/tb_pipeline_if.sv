// tb_pipeline_if: runs pipeline_if (default parameters: 64 points per turn,
// 10 sub-points) over a 1-turn (64 points) and a 2-turn (128 points) coil
// held in a behavioural memory with one clock of read latency. Every work
// item is compared with the expected (i, j, q) order and the expected end
// points (the last point of each turn closes back to its first), and the
// run is checked to issue exactly 10 * n^2 items in consecutive cycles,
// to flag only the final item as last, and to fetch the reference segment
// only n times.
module tb_pipeline_if;
  import fp_pkg::*;
  localparam int MAXP = 2048, PPT = 64, SUB = 10;
  localparam int AW = $clog2(MAXP), QW = $clog2(SUB);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [AW:0] n_points;
  logic busy, item_valid, item_last;
  logic [AW-1:0] raddr;
  point_t rdata, a1, a2, b1, b2;
  logic [QW-1:0] item_q;
  logic [AW:0] a_fetches;
  int checks = 0, failures = 0;

  pipeline_if dut (.clk(clk), .rst_n(rst_n), .start(start), .n_points(n_points), .busy(busy),
    .raddr(raddr), .rdata(rdata), .item_valid(item_valid), .a1(a1), .a2(a2), .b1(b1), .b2(b2),
    .item_q(item_q), .item_last(item_last), .a_fetches(a_fetches));

  function automatic point_t pt(input int k);
    return '{x: 32'(k), y: 32'(k + 100000), z: ~32'(k)};
  endfunction
  function automatic int nxt(input int k);
    return (k % PPT == PPT - 1) ? k - (PPT - 1) : k + 1;
  endfunction

  always_ff @(posedge clk) rdata <= pt(int'(raddr));
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    int i, j, q, items, first_cyc, last_cyc, cyc, lasts;
    bit bad;
    i = 0; j = 0; q = 0; items = 0; lasts = 0; cyc = 0; first_cyc = -1; last_cyc = -1;
    @(negedge clk);
    n_points = (AW + 1)'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) begin
      cyc++;
      if (item_valid) begin
        bad = (a1 != pt(i)) || (a2 != pt(nxt(i))) || (b1 != pt(j)) || (b2 != pt(nxt(j)))
              || (int'(item_q) != q);
        if (bad) begin
          failures++;
          if (failures < 10) $display("item %0d (%0d,%0d,%0d) wrong", items, i, j, q);
        end
        if (item_last) begin
          lasts++;
          last_cyc = cyc;
          if (items != SUB * n * n - 1) failures++;
        end
        if (first_cyc < 0) first_cyc = cyc;
        items++;
        q++;
        if (q == SUB) begin q = 0; j++; end
        if (j == n) begin j = 0; i++; end
      end
      @(negedge clk);
    end
    checks++;
    if (items != SUB * n * n) begin
      failures++;
      $display("n=%0d: %0d items, expected %0d", n, items, SUB * n * n);
    end
    checks++;
    if (last_cyc - first_cyc + 1 != SUB * n * n) begin
      failures++;
      $display("n=%0d: items spread over %0d cycles", n, last_cyc - first_cyc + 1);
    end
    checks++;
    if (lasts != 1) failures++;
    checks++;
    if (int'(a_fetches) != n) begin
      failures++;
      $display("n=%0d: %0d reference fetches, expected %0d", n, a_fetches, n);
    end
    checks += items;
    $display("n=%0d: %0d items in %0d cycles, %0d reference fetches", n, items, cyc, a_fetches);
  endtask

  initial begin
    n_points = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(64);
    run(128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
