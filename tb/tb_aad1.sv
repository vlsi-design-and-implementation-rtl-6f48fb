// tb_aad1 - exhaustive self-checking test of aad1.
// All 32 input combinations are compared with the integer model; the
// carry prediction must miss exactly 4 of them (P1 & P0 & cin), each with
// error 1.
module tb_aad1;
  import approx_ref_pkg::*;
  logic [1:0] a, b, s;
  logic       cin, cmsp;
  int checks = 0, failures = 0, misses = 0;

  aad1 dut (.a(a), .b(b), .cin(cin), .s(s), .cmsp(cmsp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp;
    int approx, exact;
    for (int v = 0; v < 32; v++) begin
      {a, b, cin} = 5'(v);
      #1;
      exp = ref_aad1(a, b, cin);
      checks++;
      if ({cmsp, s} !== exp) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d got cmsp=%0d s=%0d exp %0d/%0d", a, b, cin, cmsp, s, exp[2], exp[1:0]);
      end
      approx = 4*int'(cmsp) + int'(s);
      exact  = int'(a) + int'(b) + int'(cin);
      if (approx != exact) begin
        misses++;
        checks++;
        if (exact - approx != 1) failures++;
      end
    end
    checks++;
    if (misses != 4) begin
      failures++;
      $display("FAIL expected 4 mispredicted cases, saw %0d", misses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
