// tb_rca: exhaustive check of a 5-bit ripple-carry adder, with carries
// enabled ({cout,sum} = a+b+cin) and disabled (sum = a^b, cout = 0).
module tb_rca;
  localparam int W = 5;
  logic [W-1:0] a, b, sum;
  logic cin, en, cout;
  int checks = 0, failures = 0;

  rca #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .carry_en(en), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      logic [W:0] expect_v;
      {a, b, cin} = (2*W+1)'(v);
      en = 1'b1;
      expect_v = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
      #1;
      checks++;
      if ({cout, sum} != expect_v) begin
        failures++;
        $display("FAIL add a=%0d b=%0d cin=%0b got %0d", a, b, cin, {cout, sum});
      end
      en = 1'b0; cin = 1'b0;
      #1;
      checks++;
      if (sum != (a ^ b) || cout != 1'b0) begin
        failures++;
        $display("FAIL kill a=%0d b=%0d got %0d", a, b, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
