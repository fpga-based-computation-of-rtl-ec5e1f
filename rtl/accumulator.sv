// accumulator: final pipeline stage, sums one term per clock with a single
// fp_add whose output is fed back to its second input.
//
// Because the adder takes LAT_ADD = 3 cycles, the feedback loop holds three
// independent partial sums at once: the term entering in cycle c is added
// to the sum that left the adder in cycle c, which is the partial sum of
// the terms of cycles c-3, c-6, ... So the stream is summed in three
// interleaved lanes at full rate. After the last term (in_last) the three
// lane sums leave the adder in the next three cycles and are captured;
// the same adder then adds the first two and, three cycles later, the
// third, and the total is presented on result with a one-cycle done pulse
// 10 cycles after the last term. Between runs (IDLE) both adder inputs are
// zero, so the lanes start from zero when clear moves the unit to ACC.
// Cycles without in_valid add zero. The feedback structure and the adder
// latency follow the document; the lane-combining sequence is this
// implementation's own.
module accumulator
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,      // start of a run
  input  logic  in_valid,
  input  logic  in_last,
  input  fp32_t x,
  output logic  done,
  output fp32_t result
);

  typedef enum logic [2:0] {IDLE, ACC, CAPT, RED1, RED2} state_t;
  state_t state;
  logic [1:0] cnt;
  fp32_t p0, p1, p2;
  fp32_t add_a, add_b, y;

  fp_add u_add (.clk(clk), .a(add_a), .b(add_b), .sub(1'b0), .y(y));

  always_comb begin
    add_a = FP_ZERO;
    add_b = FP_ZERO;
    unique case (state)
      ACC: begin
        add_a = in_valid ? x : FP_ZERO;
        add_b = y;
      end
      CAPT: add_b = y;
      RED1: begin
        if (cnt == 2'd0) begin
          add_a = p0;
          add_b = p1;
        end else if (cnt == 2'd3) begin
          add_a = y;
          add_b = p2;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      cnt    <= '0;
      done   <= 1'b0;
      result <= FP_ZERO;
      p0 <= FP_ZERO; p1 <= FP_ZERO; p2 <= FP_ZERO;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (clear) state <= ACC;
        ACC: if (in_valid && in_last) begin
          state <= CAPT;
          cnt   <= '0;
        end
        CAPT: begin
          cnt <= cnt + 1'b1;
          if (cnt == 2'd0) p0 <= y;
          if (cnt == 2'd1) p1 <= y;
          if (cnt == 2'd2) begin
            p2    <= y;
            state <= RED1;
            cnt   <= '0;
          end
        end
        RED1: begin
          cnt <= cnt + 1'b1;
          if (cnt == 2'd3) begin
            state <= RED2;
            cnt   <= 2'd1;
          end
        end
        RED2: begin
          cnt <= cnt + 1'b1;
          if (cnt == 2'd3) begin
            result <= y;
            done   <= 1'b1;
            state  <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
