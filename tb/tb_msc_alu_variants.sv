// tb_msc_alu_variants: the two other configurations of the ALU.
//   u8   the 8-bit ALU (groups [1:0], [3:2], [7:4]), exhaustive over A, B,
//        Cin and all eight select codes
//   u64c the 64-bit ALU with carry-lookahead adders in the carry-select
//        groups, on random operands
// Each result is checked one clock after its inputs against alu_ref_pkg.
module tb_msc_alu_variants;
  import msc_pkg::*;
  import alu_ref_pkg::*;

  logic        clk = 1'b0;
  logic [7:0]  a8, b8, f8;
  logic [63:0] a, b, f;
  logic        cin, cout8, cout;
  alu_sel_e    p;
  int checks = 0, failures = 0;

  msc_alu #(.WIDTH(8), .NGROUPS(MSC8_NGROUPS), .GSIZE(MSC8_GSIZE)) u8 (
    .clk(clk), .a(a8), .b(b8), .cin(cin), .p(p), .f(f8), .cout(cout8));
  msc_alu #(.USE_CLA(1'b1)) u64c (
    .clk(clk), .a(a), .b(b), .cin(cin), .p(p), .f(f), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; a = '0; b = '0; cin = 1'b0; p = SEL_TRANSFER_INC;
    for (int v = 0; v < (1 << 20); v++) begin
      logic [64:0] e8, e64;
      @(negedge clk);
      {p, cin, a8, b8} = 20'(v);
      a = {$urandom, $urandom};
      b = (v % 5 == 0) ? ~a : {$urandom, $urandom};
      e8  = alu_ref(8, {56'd0, a8}, {56'd0, b8}, cin, p);
      e64 = alu_ref(64, a, b, cin, p);
      @(posedge clk);
      #1;
      checks++;
      if ({cout8, f8} != {e8[64], e8[7:0]}) begin
        failures++;
        if (failures < 20) $display("FAIL 8-bit p=%03b cin=%0b a=%0d b=%0d got %0b_%0d", p, cin, a8, b8, cout8, f8);
      end
      if (v % 16 == 0) begin
        checks++;
        if ({cout, f} != e64) begin
          failures++;
          if (failures < 20) $display("FAIL CLA p=%03b cin=%0b a=%h b=%h got %0b_%h", p, cin, a, b, cout, f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
