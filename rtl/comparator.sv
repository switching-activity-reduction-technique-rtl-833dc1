// comparator: output response checker of the self-test.
//
// `match` is the combinational equality of the tested product and the
// expected product (it is the pass/fail signal seen on each pattern). When
// `valid` is high, a clock edge with a mismatch increments `err_count` and
// sets the sticky `fail` flag. `clr` (from the control unit at the start of a
// test) clears both. The counter saturates instead of wrapping. The counter
// and flag are this design's additions to the document's plain comparison,
// so that the verdict of a whole test can be read at its end.
module comparator
  import bist_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             valid,
  input  logic [W-1:0]     actual,
  input  logic [W-1:0]     expected,
  output logic             match,
  output logic [CNT_W-1:0] err_count,
  output logic             fail
);
  assign match = (actual == expected);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      err_count <= '0;
      fail      <= 1'b0;
    end else if (valid && !match) begin
      if (err_count != '1) err_count <= err_count + 1'b1;
      fail <= 1'b1;
    end
  end
endmodule
