// tb_exact_adder - exact_adder at W = 8 (exhaustive) and W = 24 (random),
// compared with integer addition including the carry out.
module tb_exact_adder;
  logic [7:0]  a8, b8, s8;
  logic [23:0] a24, b24, s24;
  logic        cin, co8, co24;
  int checks = 0, failures = 0;

  exact_adder #(.W(8))  dut8  (.a(a8),  .b(b8),  .cin(cin), .s(s8),  .cout(co8));
  exact_adder #(.W(24)) dut24 (.a(a24), .b(b24), .cin(cin), .s(s24), .cout(co24));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {a8, b8, cin} = 17'(v);
      a24 = 24'($urandom); b24 = 24'($urandom);
      #1;
      checks += 2;
      if ({co8, s8} !== 9'(int'(a8) + int'(b8) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL W=8 %0d+%0d+%0d -> %0d", a8, b8, cin, {co8, s8});
      end
      if ({co24, s24} !== 25'(longint'(a24) + longint'(b24) + longint'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL W=24 %0d+%0d+%0d -> %0d", a24, b24, cin, {co24, s24});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
