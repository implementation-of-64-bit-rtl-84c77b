// tb_bec: exhaustive check of a 6-bit binary to excess-1 converter
// (q = r + 1 modulo 64), plus the 3-bit truth expressions
// q0 = ~r0, q1 = r0 ^ r1, q2 = r2 ^ (r1 & r0) on a 3-bit instance.
module tb_bec;
  logic [5:0] r, q;
  logic [2:0] r3, q3;
  int checks = 0, failures = 0;

  bec #(.WIDTH(6)) dut (.r(r), .q(q));
  bec #(.WIDTH(3)) dut3 (.r(r3), .q(q3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      r = 6'(v);
      #1;
      checks++;
      if (int'(q) != ((v + 1) % 64)) begin
        failures++;
        $display("FAIL r=%0d q=%0d", r, q);
      end
    end
    for (int v = 0; v < 8; v++) begin
      r3 = 3'(v);
      #1;
      checks++;
      if (q3 != {r3[2] ^ (r3[1] & r3[0]), r3[0] ^ r3[1], ~r3[0]}) begin
        failures++;
        $display("FAIL r3=%0d q3=%0d", r3, q3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
