// pipeline_if: the pipeline interface. It walks all ordered pairs (i, j) of
// segments, i the reference segment (outer loop) and j the other segment
// (inner loop), and for each pair presents the pipeline with SUBPOINTS
// consecutive work items, one per clock: the end points A1, A2 of segment i,
// B1, B2 of segment j, and the sub-point index q. A run therefore takes
// SUBPOINTS * n * n clocks of issue.
//
// Segment k joins point k to the next point of the same turn; the turn's
// last point joins back to its first, so a turn of POINTS_PER_TURN points
// gives as many segments. Addresses come from counters. The points of the
// current pair sit in "current" latches that the pipeline reads, while
// the points of the next pair are fetched into "next" latches during the
// first cycles of the current pair (one read per cycle from the three
// coordinate memories, read together). The reference segment's points are
// fetched only when i changes and otherwise stay cached in their latches,
// so a row of n pairs costs two reads of A instead of 2n. Before the first
// pair a short load phase (6 cycles) fills the latches.
//
// start is taken in IDLE; busy is high from the load phase to the last item;
// n_points must be a non-zero multiple of POINTS_PER_TURN and at most the
// memory depth. The fetch schedule and the load phase are this
// implementation's own; counters, latches and caching follow the document.
module pipeline_if
  import fp_pkg::*;
#(
  parameter int MAX_POINTS      = 2048,
  parameter int POINTS_PER_TURN = 64,
  parameter int SUBPOINTS       = 10,
  parameter int AW              = $clog2(MAX_POINTS),
  parameter int QW              = $clog2(SUBPOINTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW:0]   n_points,
  output logic          busy,
  // coordinate memories (read data one clock after the address)
  output logic [AW-1:0] raddr,
  input  point_t        rdata,
  // work items to the pipeline
  output logic          item_valid,
  output point_t        a1,
  output point_t        a2,
  output point_t        b1,
  output point_t        b2,
  output logic [QW-1:0] item_q,
  output logic          item_last,
  // number of reference-segment fetches in the last run
  output logic [AW:0]   a_fetches
);

  typedef enum logic [1:0] {IDLE, LOAD, RUN} state_t;
  state_t state;

  logic [AW-1:0] ci, cj;        // current pair
  logic [AW-1:0] ni, nj;        // next pair
  logic          n_none;        // no next pair
  logic          a_new;         // next pair has a new reference segment
  logic [3:0]    f;             // load / fetch step
  logic [QW-1:0] q;
  point_t        na1, na2, nb1, nb2;

  function automatic logic [AW-1:0] seg_end(input logic [AW-1:0] k);
    if ((k % AW'(POINTS_PER_TURN)) == AW'(POINTS_PER_TURN - 1))
      return k - AW'(POINTS_PER_TURN - 1);
    else
      return k + AW'(1);
  endfunction

  logic [AW-1:0] last_idx;
  assign last_idx = AW'(n_points - 1'b1);

  // fetch step within the current pair (RUN) or load phase (LOAD)
  logic [3:0] fs;
  assign fs = (state == RUN) ? 4'(q) : f;

  always_comb begin
    unique case (fs)
      4'd0:    raddr = nj;
      4'd1:    raddr = seg_end(nj);
      4'd2:    raddr = ni;
      default: raddr = seg_end(ni);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      ci        <= '0;
      cj        <= '0;
      ni        <= '0;
      nj        <= '0;
      n_none    <= 1'b0;
      a_new     <= 1'b1;
      f         <= '0;
      q         <= '0;
      a_fetches <= '0;
      na1 <= '0; na2 <= '0; nb1 <= '0; nb2 <= '0;
      a1  <= '0; a2  <= '0; b1  <= '0; b2  <= '0;
    end else begin
      // capture the data of the read issued one cycle earlier
      if (state != IDLE && !n_none) begin
        if (fs == 4'd1) nb1 <= rdata;
        if (fs == 4'd2) nb2 <= rdata;
        if (fs == 4'd3 && a_new) na1 <= rdata;
        if (fs == 4'd4 && a_new) begin
          na2       <= rdata;
          a_fetches <= a_fetches + 1'b1;
        end
      end
      unique case (state)
        IDLE: if (start) begin
          state     <= LOAD;
          f         <= '0;
          ni        <= '0;
          nj        <= '0;
          n_none    <= 1'b0;
          a_new     <= 1'b1;
          a_fetches <= '0;
        end
        LOAD: begin
          f <= f + 1'b1;
          if (f == 4'd5) begin
            a1 <= na1; a2 <= na2; b1 <= nb1; b2 <= nb2;
            ci <= ni;
            cj <= nj;
            q  <= '0;
            state <= RUN;
            // advance the next pair
            if (nj == last_idx) begin
              nj     <= '0;
              ni     <= ni + 1'b1;
              a_new  <= 1'b1;
              n_none <= (ni == last_idx);
            end else begin
              nj    <= nj + 1'b1;
              a_new <= 1'b0;
            end
          end
        end
        RUN: begin
          if (q == QW'(SUBPOINTS - 1)) begin
            q <= '0;
            if (ci == last_idx && cj == last_idx) begin
              state <= IDLE;
            end else begin
              a1 <= na1; a2 <= na2; b1 <= nb1; b2 <= nb2;
              ci <= ni;
              cj <= nj;
              if (nj == last_idx) begin
                nj     <= '0;
                ni     <= ni + 1'b1;
                a_new  <= 1'b1;
                n_none <= (ni == last_idx);
              end else begin
                nj    <= nj + 1'b1;
                a_new <= 1'b0;
              end
            end
          end else begin
            q <= q + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy       = (state != IDLE);
  assign item_valid = (state == RUN);
  assign item_q     = q;
  assign item_last  = (state == RUN) && (q == QW'(SUBPOINTS - 1))
                      && (ci == last_idx) && (cj == last_idx);

  // the next pair is fully fetched by step 4, so a pair must last 5 cycles
  initial assert (SUBPOINTS >= 5) else $error("pipeline_if: SUBPOINTS must be >= 5");

endmodule
