// alu_ref_pkg: reference model of the ALU for the testbenches, written from
// the operation list, not from the ALU's operand equations:
//   P=000 A+Cin, 001 A+B+Cin, 010 A-B-1+Cin, 011 A-1+Cin (results modulo
//   2^W, carry out = bit W of the unbounded sum with -B taken as ~B and -1
//   as all ones), 100 A|B, 101 A^B, 110 A&B, 111 ~A (carry out 0).
// Operands are held in 64-bit variables; W <= 64.
package alu_ref_pkg;
  function automatic logic [64:0] alu_ref(input int w, input logic [63:0] a,
                                          input logic [63:0] b, input logic cin,
                                          input logic [2:0] p);
    logic [64:0] mask, r, bo;
    mask = (65'd1 << w) - 1;
    case (p[1:0])
      2'b00: bo = 65'd0;
      2'b01: bo = {1'b0, b} & mask;
      2'b10: bo = ~{1'b0, b} & mask;
      default: bo = mask;
    endcase
    if (!p[2]) begin
      r = ({1'b0, a} & mask) + bo + {64'd0, cin};
      r = r & ((mask << 1) | 65'd1);  // keep W result bits and the carry
      return {r[w], r[63:0] & mask[63:0]};
    end
    case (p[1:0])
      2'b00: r = {1'b0, a | b};
      2'b01: r = {1'b0, a ^ b};
      2'b10: r = {1'b0, a & b};
      default: r = {1'b0, ~a};
    endcase
    return {1'b0, r[63:0] & mask[63:0]};
  endfunction
endpackage
