// tb_leadx - self-checking test of leadx.
// Three sizes: N=8/M=4 exhaustively (all a, b, cin); N=12/M=6 with random
// operands; the default N=16/M=8 with the low 8 bits and cin enumerated
// exhaustively and random upper bits. Every result is compared with the
// integer model. At N=16 the test also reports the error rate, mean and
// maximum error, and checks that the error never exceeds 72 (a missed
// aad1 carry, 64, plus the largest aad2 error below it, 8).
module tb_leadx;
  import approx_ref_pkg::*;
  logic [7:0]  a8, b8, s8;
  logic [11:0] a12, b12, s12;
  logic [15:0] a16, b16, s16;
  logic        cin, co8, co12, co16;
  int checks = 0, failures = 0, n_wrong16 = 0;

  leadx #(.N(8),  .M(4)) dut8  (.a(a8),  .b(b8),  .cin(cin), .s(s8),  .cout(co8));
  leadx #(.N(12), .M(6)) dut12 (.a(a12), .b(b12), .cin(cin), .s(s12), .cout(co12));
  leadx                  dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(co16));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint unsigned got, input longint unsigned exp, input string tag);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h", tag, got, exp);
    end
  endtask

  initial begin
    longint unsigned exact;
    longint e, sum_abs = 0, max_abs = 0;
    for (int v = 0; v < (1 << 17); v++) begin
      {a8, b8, cin} = 17'(v);
      a12 = 12'($urandom); b12 = 12'($urandom);
      // Low 8 bits (the approximate part) and cin enumerated exhaustively.
      a16 = {8'($urandom), a8}; b16 = {8'($urandom), b8};
      if (v < 64) begin  // corners
        a16 = (v[0]) ? 16'hffff : 16'h0000;
        b16 = (v[1]) ? 16'hffff : (v[2] ? 16'h00c0 : 16'h0000);
        if (v[3]) a16 = 16'h00bf;
      end
      #1;
      check({co8, s8},   ref_leadx(a8,  b8,  cin, 4), "N8");
      check({co12, s12}, ref_leadx(a12, b12, cin, 6), "N12");
      check({co16, s16}, ref_leadx(a16, b16, cin, 8), "N16");
      exact = longint'(a16) + longint'(b16) + longint'(cin);
      e = longint'({co16, s16}) - longint'(exact);
      sum_abs += (e < 0) ? -e : e;
      if (e > max_abs || -e > max_abs) max_abs = (e < 0) ? -e : e;
      if ({co16, s16} != 17'(exact)) begin
        n_wrong16++;
        checks++;
        // The approximate part only mis-predicts within an error far below 2^M.
        if (((longint'({co16, s16}) > exact) ? longint'({co16, s16}) - exact
                                              : exact - longint'({co16, s16})) >= 256)
          failures++;
      end
    end
    checks++;
    if (n_wrong16 == 0) failures++;
    $display("leadx N=16 M=8: %0d of %0d sums approximate, mean |error| %0.2f, max |error| %0d",
             n_wrong16, 1 << 17, real'(sum_abs) / real'(1 << 17), max_abs);
    // Worst case: a missed aad1 carry (64) plus the largest aad2 error below it (8).
    checks++;
    if (max_abs > 72) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
