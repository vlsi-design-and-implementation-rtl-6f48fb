// tb_apex - self-checking test of apex.
// N=8/M=4 exhaustively and the default N=16/M=8 with random operands,
// against the integer model. Also checks the worst-case error of the
// constant-one low bits: with carry in 0 at bit M-2 the prediction of aad1
// is exact, so |approx - exact| never exceeds 2^(M-2) - 1 and reaches it
// (for example at a = b = 0).
module tb_apex;
  import approx_ref_pkg::*;
  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;
  logic        co8, co16;
  int checks = 0, failures = 0;
  longint max_err8 = 0, max_err16 = 0;

  apex #(.N(8), .M(4)) dut8 (.a(a8), .b(b8), .s(s8), .cout(co8));
  apex                 dut16 (.a(a16), .b(b16), .s(s16), .cout(co16));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint absdiff(input longint x, input longint y);
    return (x > y) ? x - y : y - x;
  endfunction

  initial begin
    longint e;
    for (int v = 0; v < (1 << 16); v++) begin
      {a8, b8} = 16'(v);
      a16 = (v == 0) ? 16'h0 : 16'($urandom);
      b16 = (v == 0) ? 16'h0 : 16'($urandom);
      #1;
      checks += 2;
      if ({co8, s8} != 9'(ref_apex(a8, b8, 4))) begin
        failures++;
        if (failures < 10) $display("FAIL N8 %0h+%0h got %0h", a8, b8, {co8, s8});
      end
      if ({co16, s16} != 17'(ref_apex(a16, b16, 8))) begin
        failures++;
        if (failures < 10) $display("FAIL N16 %0h+%0h got %0h", a16, b16, {co16, s16});
      end
      e = absdiff(longint'({co8, s8}), longint'(a8) + longint'(b8));
      if (e > max_err8) max_err8 = e;
      e = absdiff(longint'({co16, s16}), longint'(a16) + longint'(b16));
      if (e > max_err16) max_err16 = e;
    end
    checks += 2;
    if (max_err8 != 3)   begin failures++; $display("FAIL N8 max error %0d", max_err8);   end
    if (max_err16 != 63) begin failures++; $display("FAIL N16 max error %0d", max_err16); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
