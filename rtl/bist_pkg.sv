// bist_pkg: types and constants shared by the BIST blocks.
//
// The low-power pattern generator walks through four steps per LFSR state
// (first half active, idle with injection into the second half, second half
// active, idle with injection into the first half). step_e names them; the
// BIST control unit cycles through them and drives en1/en2 from them.
// CNT_W is the width of the pattern and error counters (a design choice:
// 16 bits are enough for a full sweep of an 8-bit generator).
package bist_pkg;

  typedef enum logic [1:0] {
    STEP_H1   = 2'd0,  // en1en2 = 10: first half takes its next value
    STEP_INJ2 = 2'd1,  // en1en2 = 00: injection vector into the second half
    STEP_H2   = 2'd2,  // en1en2 = 01: second half takes its next value
    STEP_INJ1 = 2'd3   // en1en2 = 00: injection vector into the first half
  } step_e;

  typedef enum logic [1:0] {
    BCU_IDLE  = 2'd0,
    BCU_RUN   = 2'd1,
    BCU_FLUSH = 2'd2,
    BCU_DONE  = 2'd3
  } bcu_state_e;

  localparam int unsigned CNT_W = 16;

endpackage
