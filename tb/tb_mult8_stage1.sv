// tb_mult8_stage1 - checks the first reduction layer of the multiplier.
// For every pair of 8-bit operands the partial products are formed here
// (b[i] & a[j]) and fed to the layer; the weighted sum of its six output
// rows must equal a*b plus the modelled errors of the six 2x2 groups.
// Also checks that column 15 stays empty.
module tb_mult8_stage1;
  import approx_ref_pkg::*;
  logic [7:0]       a, b;
  logic [7:0][7:0]  pp;
  logic [5:0][15:0] rows;
  int checks = 0, failures = 0, n_approx = 0;

  mult8_stage1 dut (.pp(pp), .rows(rows));

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
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) pp[i][j] = a[j] & b[i];
      #1;
      sum = 0;
      for (int r = 0; r < 6; r++) begin
        sum += int'(rows[r]);
        checks++;
        if (rows[r][15] !== 1'b0) failures++;
      end
      checks++;
      if (sum != int'(ref_mult8(a, b))) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d sum=%0d exp=%0d", a, b, sum, ref_mult8(a, b));
      end
      if (sum != int'(a) * int'(b)) n_approx++;
    end
    checks++;
    if (n_approx == 0) failures++;
    $display("first layer: %0d of 65536 products approximate", n_approx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
