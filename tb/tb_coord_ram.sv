// tb_coord_ram: writes random words to random addresses of coord_ram,
// keeps a reference copy, and reads addresses back checking the data one
// clock after the address; also checks that a read returns the old word
// when the same address is written in the same cycle.
module tb_coord_ram;
  localparam int DEPTH = 2048;
  localparam int AW = $clog2(DEPTH);
  logic clk = 1'b0;
  logic we;
  logic [AW-1:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  coord_ram #(.DEPTH(DEPTH)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                  .raddr(raddr), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    // fill everything first
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = $urandom;
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] expd;
      @(negedge clk);
      raddr = AW'($urandom);
      expd  = ref_mem[raddr];
      we    = 1'($urandom);
      waddr = (i % 7 == 0) ? raddr : AW'($urandom);
      wdata = $urandom;
      if (we && waddr == raddr) expd = ref_mem[raddr];   // read-before-write
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      checks++;
      if (rdata !== expd) begin
        failures++;
        if (failures < 10) $display("mismatch addr %0d: %h vs %h", raddr, rdata, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
