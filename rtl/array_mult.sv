// array_mult: N x N unsigned carry-save array multiplier.
//
// Row 0 holds the partial product x*y0. Each following row i is a line of N
// full adders that adds the partial product x*yi to the sums of the row above
// (shifted one place right) and to its carries (kept in carry-save form and
// passed straight down), so no carry ripples inside a row. The lowest sum of
// each row is a finished product bit z[i]. A last row of N full adders, a
// ripple-carry adder with carry-in 0, merges the remaining sums and carries
// into z[2N-1:N]. This is the cell arrangement of the classic 4x4 array
// generalised to N; the operands are unsigned (the document's results for
// this multiplier, e.g. 235*235 = 55225, are unsigned products).
//
// Interface: purely combinational, x and y in, z = x*y out (2N bits).
// Delay grows linearly with N: N-1 carry-save rows plus an N-bit ripple.
module array_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z
);

  // s[i][j], c[i][j]: sum and carry of the cell in row i, column j
  logic [N-1:0] s [N];
  logic [N-1:0] c [N];
  logic [N:0]   rc;     // ripple carries of the final row

  assign s[0] = x & {N{y[0]}};
  assign c[0] = '0;
  assign z[0] = s[0][0];

  for (genvar i = 1; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_cell
      logic s_in;
      if (j < N - 1) begin : g_mid
        assign s_in = s[i-1][j+1];
      end else begin : g_msb
        assign s_in = 1'b0;
      end
      full_adder u_fa (
        .a    (x[j] & y[i]),
        .b    (s_in),
        .cin  (c[i-1][j]),
        .sum  (s[i][j]),
        .cout (c[i][j])
      );
    end
    assign z[i] = s[i][0];
  end

  assign rc[0] = 1'b0;
  for (genvar j = 0; j < N; j++) begin : g_final
    logic s_in;
    if (j < N - 1) begin : g_mid
      assign s_in = s[N-1][j+1];
    end else begin : g_msb
      assign s_in = 1'b0;
    end
    full_adder u_fa (
      .a    (c[N-1][j]),
      .b    (s_in),
      .cin  (rc[j]),
      .sum  (z[N+j]),
      .cout (rc[j+1])
    );
  end

endmodule
