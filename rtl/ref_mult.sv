// ref_mult: reference (golden) multiplier of the self-test.
//
// The block follows the published block diagram ("reference multiplier
// = a*b"); unsigned operands follow the published results.
// It produces the expected unsigned product a*b against which the multiplier
// under test is compared. It is written as a plain behavioural product and
// left to synthesis, so it shares no structure with the array or Booth
// multipliers it checks. Purely combinational; p is 2N bits wide.
module ref_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  assign p = (2*N)'(a) * (2*N)'(b);
endmodule
