// msc_adder: modified square-root carry-select adder (MSC), WIDTH bits.
//
// The word is cut into NGROUPS groups whose sizes GSIZE (least significant
// first) grow roughly with the square root of the position, so that the
// carry-in-0 adder and the BEC of a group finish at about the time the select
// carry from below arrives. Group 0 is a plain ripple-carry adder with the
// external carry in; each higher group is a csla_group (carry-in-0 adder, BEC
// one bit wider, mux) whose select is the carry out of the group below ANDed
// with carry_en. The default is the 64-bit partition 2,2,3,4,5,5,10,17,16
// (groups [1:0] [3:2] [6:4] [10:7] [15:11] [20:16] [30:21] [47:31] [63:48]);
// msc_pkg::MSC8_GSIZE gives the 8-bit one.
//
// With carry_en = 1: {cout, sum} = a + b + cin. With carry_en = 0 (the ALU's
// logic mode, carry_en = ~P[2]) the external carry, every carry inside a
// group and every group select are forced low, so sum = a ^ b and cout = 0.
// USE_CLA = 1 swaps the carry-in-0 ripple adders of groups 1 and up for
// carry-lookahead adders (the higher-speed variant); the default is the
// ripple-carry version. The group partition, the BEC one bit wider than its
// group and the carry-driven mux follow the original modified carry-select
// design; the carry_en input, the lookahead option's reach (groups 1 and up
// only) and the 18-bit BEC of the 17-bit group are this design's reading of
// it. Purely combinational.
module msc_adder
  import msc_pkg::*;
#(
  parameter int unsigned WIDTH   = 64,
  parameter int unsigned NGROUPS = MSC64_NGROUPS,
  parameter int unsigned GSIZE [NGROUPS] = MSC64_GSIZE,
  parameter bit          USE_CLA = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             carry_en,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // least significant bit of group g (g = NGROUPS gives the total width)
  function automatic int unsigned group_lsb(int unsigned g);
    int unsigned s = 0;
    for (int unsigned i = 0; i < g; i++) s += GSIZE[i];
    return s;
  endfunction

  if (group_lsb(NGROUPS) != WIDTH) begin : g_bad_partition
    $error("msc_adder: group sizes do not add up to WIDTH");
  end

  logic [NGROUPS:0] c;  // c[g]: carry out of group g-1, c[0] unused
  logic [NGROUPS-1:0] w;  // gated group select, w[g] = c[g] & carry_en

  assign c[0] = 1'b0;
  assign w[0] = cin & carry_en;

  for (genvar g = 0; g < NGROUPS; g++) begin : g_grp
    localparam int unsigned LO = group_lsb(g);
    localparam int unsigned W  = GSIZE[g];
    if (g == 0) begin : g_first
      rca #(.WIDTH(W)) u_rca (
        .a(a[LO +: W]), .b(b[LO +: W]), .cin(w[0]), .carry_en(carry_en),
        .sum(sum[LO +: W]), .cout(c[1])
      );
    end else begin : g_sel
      assign w[g] = c[g] & carry_en;
      csla_group #(.WIDTH(W), .USE_CLA(USE_CLA)) u_grp (
        .a(a[LO +: W]), .b(b[LO +: W]), .sel(w[g]), .carry_en(carry_en),
        .sum(sum[LO +: W]), .cout(c[g+1])
      );
    end
  end

  assign cout = c[NGROUPS];
endmodule
