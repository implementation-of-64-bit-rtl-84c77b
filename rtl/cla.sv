// cla: WIDTH-bit carry-lookahead adder, the faster replacement for the
// carry-in-0 ripple-carry adder of a carry-select group (the "MSC by CLA"
// variant of the adder).
//
// Each bit forms generate g = a & b & carry_en and propagate p = a ^ b. The
// carry into bit i is computed directly from the g, p and cin of the bits
// below it (sum of products, no ripple), so every sum bit depends on the
// inputs and cin rather than on the carry of the bit before:
//   c[i] = OR_j<i ( g[j] & p[j+1] & ... & p[i-1] ) | ( cin & p[0] & ... & p[i-1] )
// sum[i] = p[i] ^ c[i]. With carry_en = 0 and cin = 0 every carry is zero,
// as in the ripple-carry version. Purely combinational.
module cla #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             carry_en,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;

  assign g = a & b & {WIDTH{carry_en}};
  assign p = a ^ b;

  always_comb begin
    for (int i = 0; i <= WIDTH; i++) begin
      logic term;
      // carry-in term: cin propagated through bits 0..i-1
      term = cin;
      for (int k = 0; k < i; k++) term = term & p[k];
      c[i] = term;
      // generate terms: g[j] propagated through bits j+1..i-1
      for (int j = 0; j < i; j++) begin
        term = g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        c[i] = c[i] | term;
      end
    end
  end

  assign sum  = p ^ c[WIDTH-1:0];
  assign cout = c[WIDTH];
endmodule
