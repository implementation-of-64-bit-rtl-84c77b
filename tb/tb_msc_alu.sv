// tb_msc_alu: end-to-end test of the 64-bit ALU at its default parameters.
//
// Inputs are applied after a falling clock edge; the result must not yet be
// visible before the next rising edge and must be correct right after it
// (one clock of latency). Every select code is run with both carry inputs on
// random and directed operands, and the run includes the A = 55, B = 45
// sequence add = 100, subtract = 10, AND = 37, OR = 63. The reference is
// alu_ref_pkg. The testbench counts each of the eleven operations, carry
// out = 1, a select of the excess-1 (BEC) result in every carry-select
// group, and logic operations whose operands would have produced carries
// had they not been killed; any of these that never happens is a failure.
module tb_msc_alu;
  import msc_pkg::*;
  import alu_ref_pkg::*;

  localparam int W = 64;

  logic          clk = 1'b0;
  logic [W-1:0]  a, b, f;
  logic          cin, cout;
  alu_sel_e      p;
  int checks = 0, failures = 0;

  // operation counters: 0 transfer, 1 increment, 2 add, 3 add with carry,
  // 4 subtract with borrow, 5 subtract, 6 decrement, 7 OR, 8 XOR, 9 AND,
  // 10 complement
  int op_seen [11];
  int cout_seen = 0, kill_seen = 0;
  int bec_seen [MSC64_NGROUPS];
  string op_name [11] = '{"transfer", "increment", "add", "add with carry",
                          "subtract with borrow", "subtract", "decrement",
                          "OR", "XOR", "AND", "complement"};

  msc_alu dut (.clk(clk), .a(a), .b(b), .cin(cin), .p(p), .f(f), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int op_index(input logic [2:0] sel, input logic c);
    case (sel)
      3'b000: return c ? 1 : 0;
      3'b001: return c ? 3 : 2;
      3'b010: return c ? 5 : 4;
      3'b011: return c ? 0 : 6;
      3'b100: return 7;
      3'b101: return 8;
      3'b110: return 9;
      default: return 10;
    endcase
  endfunction

  // one operation: apply after the falling edge, check across the rising one
  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y,
                     input logic c, input logic [2:0] sel);
    logic [64:0] expect_v, prev_v;
    logic [63:0] yop;
    @(negedge clk);
    prev_v = {cout, f};
    a = x; b = y; cin = c; p = alu_sel_e'(sel);
    expect_v = alu_ref(W, x, y, c, sel);
    #4;  // just before the rising edge: still the previous result
    checks++;
    if ({cout, f} != prev_v) begin
      failures++;
      $display("FAIL result changed before the clock edge");
    end
    @(posedge clk);
    #1;
    checks++;
    if ({cout, f} != expect_v) begin
      failures++;
      $display("FAIL p=%03b cin=%0b a=%h b=%h got %0b_%h expect %0b_%h",
               sel, c, x, y, cout, f, expect_v[64], expect_v[63:0]);
    end
    op_seen[op_index(sel, c)]++;
    if (expect_v[64]) cout_seen++;
    if (sel[2] && ((x & y) != '0 || c)) kill_seen++;
    if (!sel[2]) begin
      int lo = 0;
      case (sel[1:0])
        2'b00: yop = '0;
        2'b01: yop = y;
        2'b10: yop = ~y;
        default: yop = '1;
      endcase
      for (int g = 0; g < MSC64_NGROUPS; g++) begin
        logic [64:0] part;
        if (g > 0) begin
          part = ({1'b0, x} & ((65'd1 << lo) - 1)) + ({1'b0, yop} & ((65'd1 << lo) - 1))
                 + {64'd0, c};
          if (part[lo]) bec_seen[g]++;
        end
        lo += MSC64_GSIZE[g];
      end
    end
  endtask

  initial begin
    foreach (op_seen[i]) op_seen[i] = 0;
    foreach (bec_seen[i]) bec_seen[i] = 0;
    a = '0; b = '0; cin = 1'b0; p = SEL_TRANSFER_INC;
    @(posedge clk);

    // the 55 / 45 sequence
    run(64'd55, 64'd45, 1'b0, SEL_ADD);
    checks++; if (f != 64'd100) begin failures++; $display("FAIL 55+45"); end
    run(64'd55, 64'd45, 1'b1, SEL_SUB);
    checks++; if (f != 64'd10) begin failures++; $display("FAIL 55-45"); end
    run(64'd55, 64'd45, 1'b0, SEL_AND);
    checks++; if (f != 64'd37) begin failures++; $display("FAIL 55&45"); end
    run(64'd55, 64'd45, 1'b0, SEL_OR);
    checks++; if (f != 64'd63) begin failures++; $display("FAIL 55|45"); end

    // directed: every code, both carries, on edge-case operands
    for (int sel = 0; sel < 8; sel++) begin
      for (int c = 0; c < 2; c++) begin
        run('1, 64'd1, 1'(c), 3'(sel));
        run('0, '0, 1'(c), 3'(sel));
        run('1, '1, 1'(c), 3'(sel));
        run(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'(c), 3'(sel));
        run(64'h0123_4567_89ab_cdef, 64'hfedc_ba98_7654_3210, 1'(c), 3'(sel));
      end
    end
    for (int k = 0; k < 64; k++) begin
      run((64'd1 << k) - 1, 64'd0, 1'b1, SEL_TRANSFER_INC);  // increment ripples to bit k
      run(64'd1 << k, 64'd0, 1'b0, SEL_DEC);                 // decrement borrows from bit k
    end

    // random
    for (int i = 0; i < 4000; i++) begin
      logic [63:0] x, y;
      x = {$urandom, $urandom};
      y = (i % 4 == 0) ? x : {$urandom, $urandom};
      run(x, y, 1'($urandom), 3'($urandom));
    end

    foreach (op_seen[i]) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("FAIL never ran %s", op_name[i]); end
      else $display("ran %-22s %0d times", op_name[i], op_seen[i]);
    end
    for (int g = 1; g < MSC64_NGROUPS; g++) begin
      checks++;
      if (bec_seen[g] == 0) begin failures++; $display("FAIL group %0d never selected its BEC result", g); end
    end
    checks++;
    if (cout_seen == 0) begin failures++; $display("FAIL carry out never set"); end
    checks++;
    if (kill_seen == 0) begin failures++; $display("FAIL no logic operation with killed carries"); end
    $display("carry out set %0d times, logic ops with carries killed %0d times", cout_seen, kill_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
