// msc_pkg: types and constants shared by the modified square-root
// carry-select adder (MSC) and the ALU built on it.
//
// alu_sel_e names the eight codes of the 3-bit operation select P[2:0].
// P[2] = 0 selects the arithmetic half (the adder adds A, a B-derived operand
// and the carry input); P[2] = 1 selects the logic half, in which every carry
// of the adder is forced to zero so that each result bit is X ^ Y of the
// operand logic. The arithmetic result also depends on Cin:
//   P     Cin=0               Cin=1
//   000   transfer A          increment A
//   001   add A+B             add with carry A+B+1
//   010   subtract w/ borrow  subtract A-B
//         A+~B (= A-B-1)
//   011   decrement A-1       transfer A
//   100   A OR B
//   101   A XOR B
//   110   A AND B
//   111   complement ~A
// The list of operations (seven arithmetic, four logic, three select lines,
// logic selected by P[2]) is the one the design is specified with; the exact
// code assignment above is this design's choice, the classic one for an ALU
// whose logic operations are derived from the arithmetic circuit.
//
// MSC64_GSIZE is the partition of a 64-bit word into carry-select groups,
// least significant group first: bits [1:0], [3:2], [6:4], [10:7], [15:11],
// [20:16], [30:21], [47:31], [63:48]. Group 0 is a plain ripple-carry adder;
// every other group is an RCA with carry-in 0, a BEC one bit wider and a mux.
// MSC8_GSIZE is the 8-bit partition [1:0], [3:2], [7:4].
package msc_pkg;

  typedef enum logic [2:0] {
    SEL_TRANSFER_INC = 3'b000,
    SEL_ADD          = 3'b001,
    SEL_SUB          = 3'b010,
    SEL_DEC          = 3'b011,
    SEL_OR           = 3'b100,
    SEL_XOR          = 3'b101,
    SEL_AND          = 3'b110,
    SEL_NOT          = 3'b111
  } alu_sel_e;

  localparam int unsigned MSC64_NGROUPS = 9;
  localparam int unsigned MSC64_GSIZE [MSC64_NGROUPS] = '{2, 2, 3, 4, 5, 5, 10, 17, 16};

  localparam int unsigned MSC8_NGROUPS = 3;
  localparam int unsigned MSC8_GSIZE [MSC8_NGROUPS] = '{2, 2, 4};

endpackage
