// tb_approx_mult8 - exhaustive self-checking test of the 8x8 approximate
// multiplier. All 65536 operand pairs are compared with the model
// (a*b plus the error of each 2x2 group of the first reduction layer).
// Also reports the error statistics and checks that the worst positive
// error stays within the 16-bit output (at most +228) and the result is
// exact whenever one operand is 0.
module tb_approx_mult8;
  import approx_ref_pkg::*;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_approx = 0, max_pos = 0, max_neg = 0;
  longint sum_abs = 0;

  approx_mult8 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int v = 0; v < (1 << 16); v++) begin
      {a, b} = 16'(v);
      #1;
      checks++;
      if (int'(p) != int'(ref_mult8(a, b))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d got %0d exp %0d", a, b, p, ref_mult8(a, b));
      end
      e = int'(p) - int'(a) * int'(b);
      if (e != 0) n_approx++;
      if (e > max_pos) max_pos = e;
      if (e < max_neg) max_neg = e;
      sum_abs += (e < 0) ? -e : e;
      if (a == 0 || b == 0) begin
        checks++;
        if (e != 0) failures++;
      end
    end
    checks++;
    if (max_pos > 228) failures++;
    a = 8'b01000111; b = 8'b11101100;
    #1;
    $display("a=%0d b=%0d p=%0d (exact %0d)", a, b, p, int'(a) * int'(b));
    $display("error rate %0d/65536, mean |error| %0.3f, range [%0d, %0d]",
             n_approx, real'(sum_abs) / 65536.0, max_neg, max_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
