// pipo_reg: parallel-in parallel-out register.
//
// Captures a W-bit product in one clock so that the comparator sees the
// reference and the tested product from the same pattern at the same time.
// The register and its 16-bit width follow the published block diagram;
// the load enable and reset are this design's choices.
// Synchronous active-low reset to 0; `load` enables the capture, otherwise
// the register holds. q follows d one clock after a loading edge.
module pipo_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
