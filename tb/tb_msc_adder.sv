// tb_msc_adder: checks the modified square-root carry-select adder in three
// configurations side by side:
//   u8   8 bits, groups 2,2,4, ripple-carry    - exhaustive over a, b, cin
//   u64  64 bits, groups 2,2,3,4,5,5,10,17,16  - random, directed, table
//   u64c the same with carry-lookahead group adders
// Expected values come from plain integer addition. The carry-kill input is
// checked too (sum = a ^ b, cout = 0). For the 64-bit adder the testbench
// counts, for every group, how often the carry into it was 1 (the BEC path
// selected) and 0, and fails if either never happened. The table is the
// ten-step addition sequence A = 0..9 with B and the expected S shown for
// the 64-bit adder (Cin is S - A - B).
module tb_msc_adder;
  import msc_pkg::*;

  logic [7:0]  a8, b8, s8;
  logic        cin8, en8, co8;
  logic [63:0] a, b, s, sc;
  logic        cin, en, co, coc;
  int checks = 0, failures = 0;
  int sel1 [MSC64_NGROUPS];
  int sel0 [MSC64_NGROUPS];

  msc_adder #(.WIDTH(8), .NGROUPS(MSC8_NGROUPS), .GSIZE(MSC8_GSIZE)) u8 (
    .a(a8), .b(b8), .cin(cin8), .carry_en(en8), .sum(s8), .cout(co8));
  msc_adder u64 (
    .a(a), .b(b), .cin(cin), .carry_en(en), .sum(s), .cout(co));
  msc_adder #(.USE_CLA(1'b1)) u64c (
    .a(a), .b(b), .cin(cin), .carry_en(en), .sum(sc), .cout(coc));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // carry into each group, worked out from the operands
  task automatic count_group_carries();
    int lo = 0;
    for (int g = 0; g < MSC64_NGROUPS; g++) begin
      logic [64:0] part;
      if (g > 0) begin
        part = ({1'b0, a} & ((65'd1 << lo) - 1)) + ({1'b0, b} & ((65'd1 << lo) - 1))
               + {64'd0, cin};
        if (part[lo]) sel1[g]++; else sel0[g]++;
      end
      lo += MSC64_GSIZE[g];
    end
  endtask

  task automatic check64(input logic [64:0] expect_v, input string what);
    checks++;
    if ({co, s} != expect_v || {coc, sc} != expect_v) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%0b en=%0b rca=%h cla=%h expect=%h",
               what, a, b, cin, en, {co, s}, {coc, sc}, expect_v);
    end
  endtask

  task automatic add64(input logic [63:0] x, input logic [63:0] y, input logic c);
    a = x; b = y; cin = c; en = 1'b1;
    #1;
    check64({1'b0, a} + {1'b0, b} + {64'd0, cin}, "add");
    count_group_carries();
    en = 1'b0;
    #1;
    check64({1'b0, a ^ b}, "kill");
  endtask

  localparam int NTAB = 10;
  int tab_b [NTAB] = '{555, 553, 552, 568, 569, 571, 570, 574, 575, 573};
  int tab_s [NTAB] = '{555, 554, 554, 572, 573, 576, 576, 582, 584, 583};

  initial begin
    foreach (sel1[g]) begin sel1[g] = 0; sel0[g] = 0; end
    a = '0; b = '0; cin = 1'b0; en = 1'b1;

    // 8-bit: exhaustive
    for (int v = 0; v < (1 << 17); v++) begin
      {a8, b8, cin8} = 17'(v);
      en8 = 1'b1;
      #1;
      checks++;
      if ({co8, s8} != ({1'b0, a8} + {1'b0, b8} + {8'd0, cin8})) begin
        failures++;
        $display("FAIL 8-bit a=%0d b=%0d cin=%0b got %0d", a8, b8, cin8, {co8, s8});
      end
      if (v % 7 == 0) begin
        en8 = 1'b0;
        #1;
        checks++;
        if ({co8, s8} != {1'b0, a8 ^ b8}) begin
          failures++;
          $display("FAIL 8-bit kill a=%0d b=%0d got %0d", a8, b8, {co8, s8});
        end
      end
    end

    // 64-bit: the ten-step table
    for (int i = 0; i < NTAB; i++) begin
      a = 64'(i); b = 64'(tab_b[i]); cin = 1'(tab_s[i] - i - tab_b[i]); en = 1'b1;
      #1;
      checks++;
      if (s != 64'(tab_s[i]) || sc != 64'(tab_s[i]) || co || coc) begin
        failures++;
        $display("FAIL table step %0d: got %0d / %0d, expected %0d", i, s, sc, tab_s[i]);
      end
    end

    // 64-bit: directed carry chains
    add64('1, 64'd0, 1'b1);
    add64('1, 64'd1, 1'b0);
    add64('1, '1, 1'b1);
    add64(64'h7fff_ffff_ffff_ffff, 64'd1, 1'b0);
    add64(64'h0000_7fff_ffff_ffff, 64'd0, 1'b1);
    for (int k = 0; k < 64; k++) begin
      add64((64'd1 << k) - 1, 64'd1, 1'b0);     // carry ripples exactly to bit k
      add64(64'd1 << k, 64'd1 << k, 1'b0);
    end

    // 64-bit: random, with long runs of ones mixed in
    for (int i = 0; i < 20000; i++) begin
      logic [63:0] x, y;
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      if (i % 3 == 1) y = ~x ^ (64'd1 << ($urandom % 64));
      add64(x, y, 1'($urandom));
    end

    for (int g = 1; g < MSC64_NGROUPS; g++) begin
      checks++;
      if (sel1[g] == 0 || sel0[g] == 0) begin
        failures++;
        $display("FAIL group %0d select never took one of its values (%0d/%0d)", g, sel0[g], sel1[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
