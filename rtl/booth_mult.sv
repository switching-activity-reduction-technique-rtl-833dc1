// booth_mult: radix-4 Booth multiplier for signed and unsigned operands.
//
// Three stages, as in a Booth encoder / carry-save / final adder multiplier:
//  1. Booth encoder. The multiplier y is extended by the mode bit (sign bit
//     when `tc`=1, zero when `tc`=0) to an even width NE >= N+2 and cut into
//     NE/2 overlapping 3-bit groups; each group becomes a digit in
//     {-2,-1,0,+1,+2} given by three signals: one (|digit|=1), two (|digit|=2)
//     and neg. Most digits of typical operands are 0 or +-1.
//  2. Partial product generation. The multiplicand x, extended in the same
//     way to N+1 bits, gives (N+1)+1-bit magnitudes 0, x or 2x; a negative
//     digit inverts the magnitude and adds its +1 as a separate correction
//     row, so no partial product needs a carry chain.
//  3. The partial products (sign-extended to 2N bits, shifted by 2 per digit)
//     and the correction row are accumulated in a chain of carry-save adders
//     into a sum word S and a carry word C, which one final adder resolves
//     into the product.
// The radix (4) and the sign-extension scheme are this design's choices; the
// signed/unsigned capability, Booth encoding, carry-save accumulation and
// final adder follow the document.
//
// Interface: purely combinational. tc=0: p = x*y with x, y unsigned;
// tc=1: p = x*y with x, y two's complement. p is the 2N-bit product.
module booth_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic           tc,
  output logic [2*N-1:0] p
);

  localparam int unsigned NE   = ((N + 3) / 2) * 2;  // even width >= N+2
  localparam int unsigned D    = NE / 2;             // number of Booth digits
  localparam int unsigned W    = 2 * N;
  localparam int unsigned ROWS = D + 1;              // partial products + correction

  logic [N:0]    xe;        // extended multiplicand
  logic [NE:0]   ye;        // extended multiplier with the implicit 0 below bit 0
  logic [D-1:0]  d_one, d_two, d_neg;
  logic [W-1:0]  row [ROWS];

  assign xe = {tc & x[N-1], x};
  assign ye = {{(NE - N){tc & y[N-1]}}, y, 1'b0};

  // Booth encoder
  always_comb begin
    for (int j = 0; j < D; j++) begin
      logic b_hi, b_mid, b_lo;
      b_hi     = ye[2*j+2];
      b_mid    = ye[2*j+1];
      b_lo     = ye[2*j];
      d_neg[j] = b_hi;
      d_one[j] = b_mid ^ b_lo;
      d_two[j] = (b_hi & ~b_mid & ~b_lo) | (~b_hi & b_mid & b_lo);
    end
  end

  // Partial product generation: (N+2)-bit words, inverted for negative digits
  always_comb begin
    logic [W-1:0] corr;
    corr = '0;
    for (int j = 0; j < D; j++) begin
      logic [N+1:0] mag;
      logic [W-1:0] ext;
      if (d_two[j])      mag = {xe, 1'b0};
      else if (d_one[j]) mag = {xe[N], xe};
      else               mag = '0;
      if (d_neg[j]) mag = ~mag;
      ext    = W'({{(W > N + 2 ? W - N - 2 : 1){mag[N+1]}}, mag});
      row[j] = ext << (2 * j);
      if (2 * j < W) corr[2*j] = d_neg[j];
    end
    row[D] = corr;
  end

  // Carry-save accumulation
  logic [W-1:0] acc_s [ROWS-1];
  logic [W-1:0] acc_c [ROWS-1];

  assign acc_s[0] = row[0];
  assign acc_c[0] = row[1];

  for (genvar k = 2; k < ROWS; k++) begin : g_acc
    csa #(.W(W)) u_csa (
      .a     (acc_s[k-2]),
      .b     (acc_c[k-2]),
      .c     (row[k]),
      .sum   (acc_s[k-1]),
      .carry (acc_c[k-1])
    );
  end

  // Final adder
  assign p = acc_s[ROWS-2] + acc_c[ROWS-2];

endmodule
