// cla8 -- WIDTH-bit carry lookahead adder (8 bits by default).
//
// In the 8x8 multiplier it adds the two cross products A[7:4]*B[3:0] and
// A[3:0]*B[7:4]. Each bit position forms a generate g = a & b and a propagate
// p = a ^ b. Every carry is then computed directly from the g, p and the carry in,
// c[i+1] = g[i] | p[i] & c[i] expanded over all lower positions, so no carry waits
// on the one below it; the sum bit is p ^ c. The lookahead is written as a
// two-level product of propagate terms per carry, flat across the whole width.
// That the adder is a carry lookahead adder follows the published block diagram;
// its internal organisation (one flat lookahead level) is this design's choice.
//
// Interface: a, b, cin in; sum = (a + b + cin) mod 2^WIDTH and cout = the carry
// out of the top bit. Purely combinational.
module cla8 #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  // c[i] = OR over j < i of ( g[j] AND p[j+1] .. p[i-1] ), OR ( cin AND p[0] .. p[i-1] )
  always_comb begin
    logic term;
    for (int i = 0; i <= WIDTH; i++) begin
      term = cin;
      for (int k = 0; k < i; k++)
        term = term & p[k];
      c[i] = term;
      for (int j = 0; j < i; j++) begin
        term = g[j];
        for (int k = j + 1; k < i; k++)
          term = term & p[k];
        c[i] = c[i] | term;
      end
    end
  end

  assign sum  = p ^ c[WIDTH-1:0];
  assign cout = c[WIDTH];

endmodule
