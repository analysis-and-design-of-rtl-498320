// rca8 -- WIDTH-bit ripple carry adder (8 bits by default).
//
// A chain of full adders: bit i adds a[i], b[i] and the carry from bit i-1, and
// passes its own carry up to bit i+1. In the 8x8 multiplier two of these serve
// as "Adder 2" (middle partial sum plus the upper half of the low product) and
// "Adder 3" (high product plus the carries of the middle). The ripple structure
// follows the adder instance names of the published RTL schematic; the block
// diagram itself only calls them 8-bit adders.
//
// Interface: a, b, cin in; sum = (a + b + cin) mod 2^WIDTH and cout = the carry
// out of the top bit. Purely combinational.
module rca8 #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[WIDTH];

endmodule
