// tb_csla_group: exhaustive check of a 4-bit carry-select group with a
// ripple-carry and with a carry-lookahead carry-in-0 adder. With carry_en = 1
// {cout,sum} must equal a + b + sel (sel is the carry from the group below);
// with carry_en = 0 and sel = 0 it must be {0, a ^ b}.
module tb_csla_group;
  localparam int W = 4;
  logic [W-1:0] a, b, sum_r, sum_c;
  logic sel, en, cout_r, cout_c;
  int checks = 0, failures = 0;

  csla_group #(.WIDTH(W), .USE_CLA(1'b0)) dut_r (
    .a(a), .b(b), .sel(sel), .carry_en(en), .sum(sum_r), .cout(cout_r));
  csla_group #(.WIDTH(W), .USE_CLA(1'b1)) dut_c (
    .a(a), .b(b), .sel(sel), .carry_en(en), .sum(sum_c), .cout(cout_c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W:0] expect_v);
    checks++;
    if ({cout_r, sum_r} != expect_v || {cout_c, sum_c} != expect_v) begin
      failures++;
      $display("FAIL a=%0d b=%0d sel=%0b en=%0b rca=%0d cla=%0d expect=%0d",
               a, b, sel, en, {cout_r, sum_r}, {cout_c, sum_c}, expect_v);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      {a, b, sel} = (2*W+1)'(v);
      en = 1'b1;
      #1;
      check({1'b0, a} + {1'b0, b} + {{W{1'b0}}, sel});
      en = 1'b0; sel = 1'b0;
      #1;
      check({1'b0, a ^ b});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
