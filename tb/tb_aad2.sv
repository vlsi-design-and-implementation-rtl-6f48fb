// tb_aad2 - exhaustive self-checking test of aad2.
// All 32 input combinations are compared with the integer model, and the
// error profile is checked: 8 wrong results, 2 of magnitude 2 and 6 of
// magnitude 1 (error probability 0.25).
module tb_aad2;
  import approx_ref_pkg::*;
  logic [1:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;
  int n_err = 0, n_err1 = 0, n_err2 = 0;

  aad2 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp;
    int approx, exact, e;
    for (int v = 0; v < 32; v++) begin
      {a, b, cin} = 5'(v);
      #1;
      exp = ref_aad2(a, b, cin);
      checks++;
      if ({cout, s} !== exp) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d got cout=%0d s=%0d exp %0d/%0d", a, b, cin, cout, s, exp[2], exp[1:0]);
      end
      checks++;
      if (cout !== a[1]) failures++;
      approx = 4*int'(cout) + int'(s);
      exact  = int'(a) + int'(b) + int'(cin);
      e = (approx > exact) ? approx - exact : exact - approx;
      if (e != 0) n_err++;
      if (e == 1) n_err1++;
      if (e == 2) n_err2++;
    end
    checks++;
    if (n_err != 8 || n_err1 != 6 || n_err2 != 2) begin
      failures++;
      $display("FAIL error profile %0d wrong, %0d of 1, %0d of 2", n_err, n_err1, n_err2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
