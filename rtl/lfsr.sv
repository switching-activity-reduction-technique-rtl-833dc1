// lfsr: conventional external-feedback (Fibonacci) linear feedback shift register.
//
// Flip-flops D1..DN are in series: on each enabled clock Di+1 takes Di, and D1
// takes the XOR of the tapped flip-flop outputs. Bit i-1 of `state` is Di, and
// bit i-1 of TAPS selects Di as a feedback tap, i.e. the term x^i of the
// feedback polynomial. With N=3 and TAPS=3'b101 (x^3+x+1, taps at D1 and D3)
// and seed D1D2D3=100 it runs 100,110,111,011,101,010,001 and repeats
// (period 7); TAPS=3'b111 (1+x+x^2+x^3) gives the short cycle 100,110,011,001.
//
// The structure and the 3-bit examples follow the published description.
// The default 8-bit polynomial x^8+x^6+x^5+x^4+1 (taps D4,D5,D6,D8, period
// 255) and the seed (D1=1, others 0, the 8-bit analogue of the 3-bit example
// seed 100) are this design's choices.
//
// Interface: synchronous active-low reset loads SEED; `en` advances one step
// per clock. `next_state` is the combinational successor of `state`, which the
// low-power generator uses to update one half of its output at a time.
module lfsr #(
  parameter int unsigned N       = 8,
  parameter logic [N-1:0] TAPS   = 8'b1011_1000,
  parameter logic [N-1:0] SEED   = 8'h01
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] state,
  output logic [N-1:0] next_state
);

  always_comb begin
    next_state    = state << 1;
    next_state[0] = ^(state & TAPS);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= next_state;
  end

endmodule
