// csla_mux: the 2WIDTH:WIDTH multiplexer of a carry-select group (6:3, 8:4,
// 10:5, ... for groups of 2, 3, 4 ... adder bits). It passes in0 (the
// carry-in-0 result) when sel = 0 and in1 (the BEC result) when sel = 1;
// sel is the carry out of the group below. Purely combinational.
module csla_mux #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] out
);
  always_comb out = sel ? in1 : in0;
endmodule
