// vedic_mul4 -- unsigned 4x4-bit multiplier, Urdhva Tiryakbhyam (vertical and
// crosswise) method.
//
// How it works: the sixteen partial products a[i] & b[j] are formed at once by
// AND gates. Column k collects every product with i + j = k (the "vertical" and
// "crosswise" pairings of the sutra). Each column adds its products to the carries
// it receives and keeps bit 0 of that count as product bit p[k]. Bit 1 of the
// count goes to column k+1 and bit 2 goes straight to column k+2, so a column
// never waits for a carry to ripple through the one beside it. Product bit p[7]
// is what columns 5 and 6 pass beyond column 6.
//
// Column equations (cX = count of column X, "c1"/"c2" its bits 1 and 2):
//   c0 = a0b0
//   c1 = a1b0 + a0b1
//   c2 = a2b0 + a1b1 + a0b2                + c1.1
//   c3 = a3b0 + a2b1 + a1b2 + a0b3         + c2.1
//   c4 = a3b1 + a2b2 + a1b3                + c3.1 + c2.2
//   c5 = a3b2 + a2b3                       + c4.1 + c3.2
//   c6 = a3b3                              + c5.1 + c4.2
//   p7 = c6.1 | c5.2   (both never set together: the product fits in 8 bits)
// The AND array, the per-column adders and the forwarding of a column's carry to
// the next two columns follow the published architecture; the exact carry terms
// of each column are worked out here so that every product is exact.
//
// Interface: a[3:0], b[3:0] in, p[7:0] = a * b out. Purely combinational, no
// clock; the result is valid one gate-level settling time after the inputs.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [3:0] pp [4];        // pp[i][j] = a[i] & b[j]
  logic [2:0] col [7];       // count of each column, products plus carries

  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        pp[i][j] = a[i] & b[j];
  end

  always_comb begin
    col[0] = {2'b0, pp[0][0]};
    col[1] = 3'(pp[1][0]) + 3'(pp[0][1]);
    col[2] = 3'(pp[2][0]) + 3'(pp[1][1]) + 3'(pp[0][2]) + 3'(col[1][1]);
    col[3] = 3'(pp[3][0]) + 3'(pp[2][1]) + 3'(pp[1][2]) + 3'(pp[0][3])
           + 3'(col[2][1]);
    col[4] = 3'(pp[3][1]) + 3'(pp[2][2]) + 3'(pp[1][3])
           + 3'(col[3][1]) + 3'(col[2][2]);
    col[5] = 3'(pp[3][2]) + 3'(pp[2][3])
           + 3'(col[4][1]) + 3'(col[3][2]);
    col[6] = 3'(pp[3][3]) + 3'(col[5][1]) + 3'(col[4][2]);
  end

  always_comb begin
    for (int k = 0; k < 7; k++)
      p[k] = col[k][0];
    p[7] = col[6][1] | col[5][2];
  end

endmodule
