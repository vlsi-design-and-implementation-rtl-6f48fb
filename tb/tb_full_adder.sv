// tb_full_adder - exhaustive test of full_adder against a + b + c.
module tb_full_adder;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (2*int'(co) + int'(s) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL %b%b%b -> co=%b s=%b", a, b, c, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
