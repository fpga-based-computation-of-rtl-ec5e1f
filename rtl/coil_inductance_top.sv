// coil_inductance_top: FPGA accelerator for the inductance of a
// magnetic-stimulation coil.
//
// The coil is given as a list of points (64 per turn by default), each
// turn closed, so that n points make n straight segments. The inductance
// is the sum, over all ordered pairs of segments (a segment with itself
// included, which gives the self terms), of the Neumann integral of the
// pair. The accelerator evaluates each pair as SUBPOINTS pieces of the
// reference segment, each integrated in closed form along the other
// segment, and adds one such term per clock:
//
//   coordinate memories X, Y, Z (coord_ram x3)
//     -> pipeline interface (pipeline_if: address counters, point latches)
//     -> var_gen (var1..var5) -> accum_value (term) -> accumulator -> result
//
// A run issues SUBPOINTS * n^2 terms in as many clocks, plus a fixed
// start-up and drain overhead of RUN_OVERHEAD cycles. result is the sum in
// metres when the coordinates are in metres; the inductance in henry is
// 1e-7 * result (mu0 / 4pi).
//
// Interface: while idle the host writes the points, already computed in
// software, with wr_en/wr_addr/wr_x/wr_y/wr_z; it sets n_points (a multiple
// of POINTS_PER_TURN) and wire_r2 (the squared radius of the wire, which
// keeps the self term finite) and pulses start. busy stays high until done
// pulses with result valid; cycles holds the clock count of the run and
// a_fetches the number of times the reference segment was (re)loaded.
module coil_inductance_top
  import fp_pkg::*;
#(
  parameter int MAX_POINTS      = 2048,
  parameter int POINTS_PER_TURN = 64,
  parameter int SUBPOINTS       = 10,
  parameter int AW              = $clog2(MAX_POINTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // point loading
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  fp32_t         wr_x,
  input  fp32_t         wr_y,
  input  fp32_t         wr_z,
  // run control
  input  logic [AW:0]   n_points,
  input  fp32_t         wire_r2,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output fp32_t         result,
  output logic [31:0]   cycles,
  output logic [AW:0]   a_fetches   // reference-segment fetches of the run
);

  localparam int QW = $clog2(SUBPOINTS);
  // clocks of a run beyond the SUBPOINTS * n^2 issue cycles: load phase,
  // pipeline depth and the accumulator's final reduction
  localparam int RUN_OVERHEAD = 6 + V2_AT + AV_LAT + 10;

  // ---- coordinate memories
  logic [AW-1:0] raddr;
  point_t        rdata;

  coord_ram #(.DEPTH(MAX_POINTS)) u_mem_x (.clk(clk), .we(wr_en), .waddr(wr_addr),
    .wdata(wr_x), .raddr(raddr), .rdata(rdata.x));
  coord_ram #(.DEPTH(MAX_POINTS)) u_mem_y (.clk(clk), .we(wr_en), .waddr(wr_addr),
    .wdata(wr_y), .raddr(raddr), .rdata(rdata.y));
  coord_ram #(.DEPTH(MAX_POINTS)) u_mem_z (.clk(clk), .we(wr_en), .waddr(wr_addr),
    .wdata(wr_z), .raddr(raddr), .rdata(rdata.z));

  // ---- pipeline interface
  logic          if_busy, it_valid, it_last;
  point_t        a1, a2, b1, b2;
  logic [QW-1:0] it_q;

  pipeline_if #(.MAX_POINTS(MAX_POINTS), .POINTS_PER_TURN(POINTS_PER_TURN),
                .SUBPOINTS(SUBPOINTS)) u_if (
    .clk(clk), .rst_n(rst_n), .start(start && !busy), .n_points(n_points),
    .busy(if_busy), .raddr(raddr), .rdata(rdata),
    .item_valid(it_valid), .a1(a1), .a2(a2), .b1(b1), .b2(b2),
    .item_q(it_q), .item_last(it_last), .a_fetches(a_fetches));

  // ---- pipeline
  logic  vg_valid, vg_last, av_valid, av_last;
  fp32_t var1, var2, var3, var4, var5, term;

  var_gen #(.SUBPOINTS(SUBPOINTS)) u_vg (
    .clk(clk), .rst_n(rst_n), .in_valid(it_valid), .in_last(it_last),
    .a1(a1), .a2(a2), .b1(b1), .b2(b2), .in_q(it_q), .wire_r2(wire_r2),
    .out_valid(vg_valid), .out_last(vg_last),
    .var1(var1), .var2(var2), .var3(var3), .var4(var4), .var5(var5));

  accum_value u_av (
    .clk(clk), .rst_n(rst_n), .in_valid(vg_valid), .in_last(vg_last),
    .var1(var1), .var2(var2), .var3(var3), .var4(var4), .var5(var5),
    .out_valid(av_valid), .out_last(av_last), .term(term));

  accumulator u_acc (
    .clk(clk), .rst_n(rst_n), .clear(start && !busy),
    .in_valid(av_valid), .in_last(av_last), .x(term),
    .done(done), .result(result));

  // ---- run state and cycle counter
  logic running;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cycles  <= '0;
    end else if (start && !busy) begin
      running <= 1'b1;
      cycles  <= '0;
    end else if (running) begin
      cycles <= cycles + 1'b1;
      if (done) running <= 1'b0;
    end
  end
  assign busy = running;

  // the interface must not be restarted while it runs
  assert property (@(posedge clk) disable iff (!rst_n) if_busy |-> busy);

endmodule
