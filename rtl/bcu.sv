// bcu: BIST control unit.
//
// A small state machine that runs one self-test when `enable` is raised:
//   IDLE  waits for enable; on leaving it pulses `clr` to the comparator.
//   RUN   one clock per test vector: drives the pattern generator's four
//         steps in turn (en1en2 = 10, 00, 01, 00, see lp_lfsr), loads the
//         product registers with the product of the vector on the inputs,
//         and counts the vectors in `count`. After NUM_PATTERNS vectors it
//         goes on to
//   FLUSH one clock in which the last captured products are compared, then
//   DONE  raises `done` and holds until enable is dropped.
// `compare_valid` is `capture` delayed one clock: it marks the clocks in which
// the product registers hold a result to be compared. The step order is the
// document's; the state machine, the counter and the test length are this
// design's choices (NUM_PATTERNS defaults to 4*255, so that an 8-bit
// generator walks once through all 255 states of its LFSR).
module bcu
  import bist_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 1020
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  output logic             tpg_en,
  output logic             en1,
  output logic             en2,
  output logic             capture,
  output logic             compare_valid,
  output logic             clr,
  output logic [CNT_W-1:0] count,
  output logic             done
);

  bcu_state_e state;
  step_e      step;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= BCU_IDLE;
      step          <= STEP_H1;
      count         <= '0;
      compare_valid <= 1'b0;
    end else begin
      compare_valid <= capture;
      unique case (state)
        BCU_IDLE: if (enable) begin
          state <= BCU_RUN;
          step  <= STEP_H1;
          count <= '0;
        end
        BCU_RUN: begin
          step  <= step_e'(step + 2'd1);
          count <= count + 1'b1;
          if (count == CNT_W'(NUM_PATTERNS - 1)) state <= BCU_FLUSH;
        end
        BCU_FLUSH: state <= BCU_DONE;
        BCU_DONE:  if (!enable) state <= BCU_IDLE;
      endcase
    end
  end

  always_comb begin
    tpg_en  = (state == BCU_RUN);
    capture = (state == BCU_RUN);
    en1     = tpg_en && (step == STEP_H1);
    en2     = tpg_en && (step == STEP_H2);
    clr     = (state == BCU_IDLE) && enable;
    done    = (state == BCU_DONE);
  end

  initial assert (NUM_PATTERNS > 0 && NUM_PATTERNS < (1 << CNT_W))
    else $error("bcu: NUM_PATTERNS out of range");

endmodule
