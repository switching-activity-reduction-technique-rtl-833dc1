// csa: W-bit carry-save adder (3:2 compressor), used by the Booth multiplier's
// accumulation. For three words a, b, c it returns sum and carry with
// sum + carry = a + b + c (mod 2^W); carry is already shifted one place left.
// The carry-save accumulation follows the published Booth multiplier;
// the word-wide 3:2 cell is this design's way of building it.
// Purely combinational.
module csa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] maj;
  assign sum   = a ^ b ^ c;
  assign maj   = (a & b) | (a & c) | (b & c);
  assign carry = {maj[W-2:0], 1'b0};
endmodule
