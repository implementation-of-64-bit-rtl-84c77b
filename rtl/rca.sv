// rca: WIDTH-bit ripple-carry adder made of full_adder cells.
//
// The carry leaving every cell is ANDed with carry_en before it enters the
// next cell and before it leaves as cout. In the ALU carry_en is ~P[2], so
// during a logic operation no carry propagates and each sum bit is a ^ b
// (with cin also forced low by the caller). With carry_en = 1 it is an
// ordinary adder: {cout, sum} = a + b + cin. Gating every stage carry with
// ~P[2] follows the original ALU structure; the least significant cell of a
// carry-in-0 adder is a full adder with its carry tied low where the original
// draws a half adder (same function).
// Purely combinational.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             carry_en,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;     // gated carry into each cell
  logic [WIDTH-1:0] co;  // raw carry out of each cell

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(co[i])
    );
    assign c[i+1] = co[i] & carry_en;
  end

  assign cout = c[WIDTH];
endmodule
