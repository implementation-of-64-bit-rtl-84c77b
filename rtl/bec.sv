// bec: WIDTH-bit binary to excess-1 converter, q = r + 1 (mod 2^WIDTH).
//
// It replaces the carry-in-1 adder of a carry-select group: the sum with
// carry-in 1 is the sum with carry-in 0 plus one. Built from a NOT, a chain
// of two-input ANDs and XORs, one per bit:
//   q[0] = ~r[0]
//   t[0] = 1,     t[i] = t[i-1] & r[i-1]   (AND of all lower bits)
//   q[i] = r[i] ^ t[i]
// In a group of n adder bits the BEC is n+1 bits wide, the extra bit being
// the group's carry-out. Purely combinational.
module bec #(
  parameter int unsigned WIDTH = 6
) (
  input  logic [WIDTH-1:0] r,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] t;  // t[i] = &r[i-1:0]

  assign t[0] = 1'b1;
  assign q[0] = ~r[0];

  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    assign t[i] = t[i-1] & r[i-1];
    assign q[i] = r[i] ^ t[i];
  end
endmodule
