// vedic_mul8 -- unsigned 8x8-bit Vedic multiplier (top level).
//
// The 8-bit operands are split into nibbles, A = {AH, AL} and B = {BH, BL}, and
// the vertical-and-crosswise rule is applied one level up, on nibbles instead of
// bits:
//   M1 = AL*BL   (vertical, low)      M2 = AL*BH  (crosswise)
//   M3 = AH*BL   (crosswise)          M4 = AH*BH  (vertical, high)
// Each of the four is an 8-bit product from a vedic_mul4. The product is then
//   P = M4*2^8 + (M2 + M3)*2^4 + M1
// and is assembled with three 8-bit adders:
//   cla8  (carry lookahead)  M5 = M3 + M2, carry out c5 (weight 2^12)
//   Adder 2 (ripple)         M6 = M5 + {0000, M1[7:4]}, carry out c6 (weight 2^12)
//   Adder 3 (ripple)         M7 = M4 + {000, c5|c6, M6[7:4]}
//   P[3:0] = M1[3:0], P[7:4] = M6[3:0], P[15:8] = M7
// c5 and c6 can never both be 1: if M2 + M3 overflows 8 bits, its low byte is at
// most 194 and adding at most 15 cannot overflow again. One OR therefore merges
// them into bit 4 of Adder 3's second operand. The four nibble products, the
// carry lookahead adder for M2 + M3, Adders 2 and 3 and the M1..M7 signal names
// follow the published block diagram; how the two middle carries reach Adder 3
// is this design's own completion of it.
//
// Interface: a[7:0], b[7:0] in, p[15:0] = a * b out. Purely combinational: no
// clock, no reset, no handshake; the product is valid one settling time after
// the operands change.
module vedic_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  logic [7:0] m1, m2, m3, m4;     // nibble products
  logic [7:0] m5, m6, m7;         // adder outputs
  logic       c5, c6;             // carries out of the middle adders
  logic       c7;                 // carry out of Adder 3, always 0

  // Four 4x4 Vedic multipliers
  vedic_mul4 u_mul_m1 (.a(a[3:0]), .b(b[3:0]), .p(m1));
  vedic_mul4 u_mul_m2 (.a(a[3:0]), .b(b[7:4]), .p(m2));
  vedic_mul4 u_mul_m3 (.a(a[7:4]), .b(b[3:0]), .p(m3));
  vedic_mul4 u_mul_m4 (.a(a[7:4]), .b(b[7:4]), .p(m4));

  // Cross products: 8-bit carry lookahead adder
  cla8 #(.WIDTH(8)) u_cla (
    .a(m3), .b(m2), .cin(1'b0), .sum(m5), .cout(c5)
  );

  // Adder 2: middle sum plus the upper nibble of the low product
  rca8 #(.WIDTH(8)) u_adder2 (
    .a(m5), .b({4'b0000, m1[7:4]}), .cin(1'b0), .sum(m6), .cout(c6)
  );

  // Adder 3: high product plus the upper nibble and carries of the middle
  rca8 #(.WIDTH(8)) u_adder3 (
    .a(m4), .b({3'b000, c5 | c6, m6[7:4]}), .cin(1'b0), .sum(m7), .cout(c7)
  );

  assign p = {m7, m6[3:0], m1[3:0]};

  // The full product fits in 16 bits, so neither pair of middle carries nor
  // Adder 3 can overflow.
  always_comb begin
    assert (c7 == 1'b0) else $error("vedic_mul8: Adder 3 overflow");
    assert (!(c5 && c6)) else $error("vedic_mul8: both middle carries set");
  end

endmodule
