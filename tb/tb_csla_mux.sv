// tb_csla_mux: random check of an 8:4 carry-select multiplexer.
module tb_csla_mux;
  logic sel;
  logic [3:0] in0, in1, out;
  int checks = 0, failures = 0;

  csla_mux #(.WIDTH(4)) dut (.sel(sel), .in0(in0), .in1(in1), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = 1'($urandom);
      in0 = 4'($urandom);
      in1 = 4'($urandom);
      #1;
      checks++;
      if (out != (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%0b in0=%0h in1=%0h out=%0h", sel, in0, in1, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
