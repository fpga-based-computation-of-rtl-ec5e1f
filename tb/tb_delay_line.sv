// tb_delay_line: checks that delay_line returns every input word exactly
// DEPTH clocks later, for the default depth (14) and for depth 0 (a wire).
module tb_delay_line;
  localparam int DEPTH = 14;
  logic clk = 1'b0;
  logic [31:0] d, q, q0;
  int checks = 0, failures = 0;
  logic [31:0] hist [$];

  delay_line #(.WIDTH(32), .DEPTH(DEPTH)) dut (.clk(clk), .d(d), .q(q));
  delay_line #(.WIDTH(32), .DEPTH(0)) dut0 (.clk(clk), .d(d), .q(q0));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = $urandom;
      hist.push_back(d);
      #1;
      checks++;
      if (q0 !== d) failures++;
      @(posedge clk); #1;
      if (i >= DEPTH - 1) begin
        checks++;
        if (q !== hist[i + 1 - DEPTH]) begin
          failures++;
          $display("mismatch at %0d: %h vs %h", i, q, hist[i + 1 - DEPTH]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
