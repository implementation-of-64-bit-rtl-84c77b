// alu_operand_logic: the per-bit input logic of the ALU. It turns A, B and
// the select P[2:0] into the two adder operands X and Y so that one adder
// produces every operation. The adder then computes F = X + Y + (Cin & ~P[2])
// with all carries killed when P[2] = 1, so in logic mode F = X ^ Y.
//
//   X_i = A_i | (P2 & ~P1 & ~P0 & B_i) | (P2 & P1 & ~P0 & ~B_i)
//   Y_i = (P0 & B_i) | (P1 & ~B_i)
//
// Arithmetic (P2 = 0): X = A and Y = 0, B, ~B or all ones for P1P0 = 00, 01,
// 10, 11 (transfer/increment, add, subtract, decrement).
// Logic (P2 = 1, no carries): P1P0 = 00 gives X = A|B, Y = 0 -> OR;
// 01 gives A ^ B -> XOR; 10 gives (A|~B) ^ ~B = A & B -> AND; 11 gives
// A ^ 1 = ~A -> complement.
// That the logic functions come from modifying the arithmetic operands is
// the method the design follows; the equations and code assignment are this
// design's choice. Purely combinational.
module alu_operand_logic #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       p,
  output logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y
);
  logic or_mode, and_mode;

  always_comb begin
    or_mode  = p[2] & ~p[1] & ~p[0];
    and_mode = p[2] &  p[1] & ~p[0];
    x = a | ({WIDTH{or_mode}} & b) | ({WIDTH{and_mode}} & ~b);
    y = ({WIDTH{p[0]}} & b) | ({WIDTH{p[1]}} & ~b);
  end
endmodule
