// msc_alu: WIDTH-bit ALU (64 by default) built on the modified square-root
// carry-select adder.
//
// P[2:0] selects one of seven arithmetic operations (with Cin: transfer,
// increment, add, add with carry, subtract, subtract with borrow, decrement)
// or four logic operations (OR, XOR, AND, complement); msc_pkg::alu_sel_e
// lists the codes. alu_operand_logic forms the adder operands X and Y from
// A, B and P; msc_adder adds them with carry-in Cin & ~P[2] and with every
// carry ANDed with ~P[2], so a logic operation leaves no carry and each bit
// is X ^ Y.
//
// Timing: the datapath is combinational; F and Cout are captured in a
// register on the rising edge of clk, so a result appears one clock after its
// operands and select. There is no reset: the register is loaded every cycle
// and holds a valid result from the first edge after valid inputs. The output
// register and the absence of a reset are this design's choices. Cout is the
// adder carry out (0 for logic operations); for subtraction it is the
// inverted borrow.
module msc_alu
  import msc_pkg::*;
#(
  parameter int unsigned WIDTH   = 64,
  parameter int unsigned NGROUPS = MSC64_NGROUPS,
  parameter int unsigned GSIZE [NGROUPS] = MSC64_GSIZE,
  parameter bit          USE_CLA = 1'b0
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  alu_sel_e         p,
  output logic [WIDTH-1:0] f,
  output logic             cout
);
  logic [WIDTH-1:0] x, y, f_d;
  logic             cout_d;
  logic             carry_en;

  assign carry_en = ~p[2];

  alu_operand_logic #(.WIDTH(WIDTH)) u_ops (
    .a(a), .b(b), .p(p), .x(x), .y(y)
  );

  msc_adder #(
    .WIDTH(WIDTH), .NGROUPS(NGROUPS), .GSIZE(GSIZE), .USE_CLA(USE_CLA)
  ) u_add (
    .a(x), .b(y), .cin(cin), .carry_en(carry_en), .sum(f_d), .cout(cout_d)
  );

  always_ff @(posedge clk) begin
    f    <= f_d;
    cout <= cout_d;
  end
endmodule
