// tb_pp_gen - checks pp_gen: every bit pp[i][j] equals b[i] & a[j], and
// the weighted sum of all partial products equals a * b.
module tb_pp_gen;
  logic [7:0]      a, b;
  logic [7:0][7:0] pp;
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    for (int v = 0; v < (1 << 16); v++) begin
      {a, b} = 16'(v);
      #1;
      sum = 0;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          if (pp[i][j]) sum += 1 << (i + j);
          if (v % 97 == 0) begin
            checks++;
            if (pp[i][j] !== (a[j] & b[i])) failures++;
          end
        end
      checks++;
      if (sum != int'(a) * int'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d sum=%0d", a, b, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
