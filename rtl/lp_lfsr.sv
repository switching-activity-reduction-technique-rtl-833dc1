// lp_lfsr: low-power test pattern generator (bipartite LFSR with injection).
//
// A conventional LFSR (lfsr) supplies the sequence; the test vector `tv` is a
// separate register split into a first half tv[H-1:0] (D1..DH) and a second
// half tv[N-1:H]. Two non-overlapping enables activate one half each, and the
// idle steps between them insert an intermediate vector, so that the bits that
// change from one LFSR state to the next change over four clocks instead of
// one. One LFSR state takes four clocks, driven by the control unit as
//   en1en2=10  first half of tv takes the LFSR's next state, second half holds
//   en1en2=00  second half takes the injection vector, first half holds
//   en1en2=01  second half takes the next state, first half holds, LFSR steps
//   en1en2=00  first half takes the injection vector, second half holds
// The module remembers which half was active last to know which half an idle
// step injects into.
//
// Injection (this design's choice of the "R injector"): for each bit a mux
// selects the exact LFSR bit where the present and next values agree, and a
// pseudo-random injection bit, the LFSR's feedback bit, where they differ.
// Every vector the plain LFSR produces therefore appears in tv after the
// en1en2=01 step, and each changing bit toggles only once on its way there.
//
// The four-step order, the en1/en2 encoding and the mux between the exact
// LFSR bit and an injected bit follow the published low-power scheme; the
// separate output register, the injection rule and the half tracking are
// this design's own.
//
// Interface: synchronous active-low reset loads tv and the LFSR with SEED.
// tpg_en=0 freezes the generator (tv, LFSR and half tracking hold); with
// tpg_en=1 every clock is one of the four steps above. tv changes on the
// clock edge of the step. en1 and en2 must never be 1 together (asserted).
module lp_lfsr #(
  parameter int unsigned  N    = 8,
  parameter logic [N-1:0] TAPS = 8'b1011_1000,
  parameter logic [N-1:0] SEED = 8'h01
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tpg_en,
  input  logic         en1,
  input  logic         en2,
  output logic [N-1:0] tv
);

  localparam int unsigned H = N / 2;

  logic [N-1:0] s_next, inj;
  logic         r_bit;
  logic         h1_last;   // the first half was the last one active

  // The LFSR completes its step together with the second half.
  lfsr #(.N(N), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (tpg_en && en2),
    .state      (),
    .next_state (s_next)
  );

  assign r_bit = s_next[0];

  // Per-bit injection mux: exact bit where present and next agree, injected
  // bit where they differ.
  always_comb begin
    for (int i = 0; i < N; i++)
      inj[i] = (tv[i] == s_next[i]) ? s_next[i] : r_bit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tv      <= SEED;
      h1_last <= 1'b0;
    end else if (!tpg_en) begin
      // generator stopped: everything holds
    end else if (en1) begin
      tv[H-1:0] <= s_next[H-1:0];
      h1_last   <= 1'b1;
    end else if (en2) begin
      tv[N-1:H] <= s_next[N-1:H];
      h1_last   <= 1'b0;
    end else if (h1_last) begin
      tv[N-1:H] <= inj[N-1:H];
    end else begin
      tv[H-1:0] <= inj[H-1:0];
    end
  end

  a_enables_non_overlapping: assert property (@(posedge clk) disable iff (!rst_n) tpg_en |-> !(en1 && en2))
    else $error("lp_lfsr: en1 and en2 active together");

endmodule
