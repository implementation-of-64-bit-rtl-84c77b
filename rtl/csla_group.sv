// csla_group: one group of the modified square-root carry-select adder.
//
// A WIDTH-bit adder with carry-in 0 (a ripple-carry adder, or a carry-
// lookahead adder when USE_CLA = 1) produces {c0, s0}. A (WIDTH+1)-bit binary
// to excess-1 converter turns that into {c0, s0} + 1, which is the result the
// group would give with carry-in 1. A 2(WIDTH+1):(WIDTH+1) multiplexer then
// picks one of the two with sel, the (gated) carry out of the group below:
//   {cout, sum} = sel ? BEC({c0, s0}) : {c0, s0}
// This is what replaces the second, carry-in-1 adder of a regular carry-
// select group. carry_en = 0 kills the internal carries (ALU logic mode);
// the caller also holds sel low then. Purely combinational.
module csla_group #(
  parameter int unsigned WIDTH   = 2,
  parameter bit          USE_CLA = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sel,
  input  logic             carry_en,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] s0;
  logic             c0;
  logic [WIDTH:0]   r1;  // carry-in-1 result from the BEC

  if (USE_CLA) begin : g_cla
    cla #(.WIDTH(WIDTH)) u_add (
      .a(a), .b(b), .cin(1'b0), .carry_en(carry_en), .sum(s0), .cout(c0)
    );
  end else begin : g_rca
    rca #(.WIDTH(WIDTH)) u_add (
      .a(a), .b(b), .cin(1'b0), .carry_en(carry_en), .sum(s0), .cout(c0)
    );
  end

  bec #(.WIDTH(WIDTH + 1)) u_bec (
    .r({c0, s0}),
    .q(r1)
  );

  csla_mux #(.WIDTH(WIDTH + 1)) u_mux (
    .sel(sel),
    .in0({c0, s0}),
    .in1(r1),
    .out({cout, sum})
  );
endmodule
