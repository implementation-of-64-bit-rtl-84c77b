// tb_alu_operand_logic: checks the adder operands X, Y for every select code.
// Arithmetic codes must give X = A and Y = 0, B, ~B, all ones; for logic
// codes the carry-free result X ^ Y must be A|B, A^B, A&B, ~A.
module tb_alu_operand_logic;
  localparam int W = 16;
  logic [W-1:0] a, b, x, y;
  logic [2:0] p;
  int checks = 0, failures = 0;

  alu_operand_logic #(.WIDTH(W)) dut (.a(a), .b(b), .p(p), .x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic ok;
      a = W'($urandom);
      b = W'($urandom);
      p = 3'(i % 8);
      #1;
      case (p)
        3'b000: ok = (x == a) && (y == '0);
        3'b001: ok = (x == a) && (y == b);
        3'b010: ok = (x == a) && (y == ~b);
        3'b011: ok = (x == a) && (y == '1);
        3'b100: ok = ((x ^ y) == (a | b));
        3'b101: ok = ((x ^ y) == (a ^ b));
        3'b110: ok = ((x ^ y) == (a & b));
        default: ok = ((x ^ y) == ~a);
      endcase
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL p=%0b a=%0h b=%0h x=%0h y=%0h", p, a, b, x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
