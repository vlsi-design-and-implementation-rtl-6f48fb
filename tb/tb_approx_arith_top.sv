// tb_approx_arith_top - end-to-end test of approx_arith_top at its default
// sizes (16-bit LEADx and APEx with an 8-bit approximate part, 8x8
// multiplier). Random and corner operands go to all three units at once;
// each output is compared with its integer model. The test counts how
// often each approximation mechanism fired and fails if one never did:
//   - a LEADx aad2 group guessed its carry wrong,
//   - LEADx aad1 missed a carry and saturated its sum bits,
//   - aad1 predicted a carry into the exact upper part (LEADx and APEx),
//   - the APEx constant-one low bits gave a wrong sum,
//   - a multiplier 2x2 group guessed its carry wrong.
module tb_approx_arith_top;
  import approx_ref_pkg::*;
  logic [7:0]  mul_a, mul_b;
  logic [15:0] mul_p;
  logic [15:0] lx_a, lx_b, lx_s, ap_a, ap_b, ap_s;
  logic        lx_cin, lx_cout, ap_cout;
  int checks = 0, failures = 0;
  int n_aad2_miss = 0, n_aad1_sat = 0, n_lx_cmsp = 0, n_ap_cmsp = 0;
  int n_ap_lsb = 0, n_mul_box = 0;

  approx_arith_top dut (
    .mul_a(mul_a), .mul_b(mul_b), .mul_p(mul_p),
    .lx_a(lx_a), .lx_b(lx_b), .lx_cin(lx_cin), .lx_s(lx_s), .lx_cout(lx_cout),
    .ap_a(ap_a), .ap_b(ap_b), .ap_s(ap_s), .ap_cout(ap_cout)
  );

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
    int unsigned c, sum, ahi, bhi;
    for (int v = 0; v < 50000; v++) begin
      mul_a = 8'($urandom); mul_b = 8'($urandom);
      lx_a = 16'($urandom); lx_b = 16'($urandom); lx_cin = 1'($urandom);
      ap_a = 16'($urandom); ap_b = 16'($urandom);
      if (v < 4) begin  // corners
        mul_a = v[0] ? 8'hff : 8'h00; mul_b = v[1] ? 8'hff : 8'h00;
        lx_a = v[0] ? 16'hffff : 16'h0; lx_b = v[1] ? 16'hffff : 16'h0; lx_cin = v[0];
        ap_a = lx_a; ap_b = lx_b;
      end
      #1;
      check(mul_p, ref_mult8(mul_a, mul_b), "mult");
      check({lx_cout, lx_s}, ref_leadx(lx_a, lx_b, lx_cin, 8), "leadx");
      check({ap_cout, ap_s}, ref_apex(ap_a, ap_b, 8), "apex");

      // Which mechanisms did this input exercise?
      c = lx_cin;
      for (int k = 0; k < 3; k++) begin
        sum = ((lx_a >> (2*k)) & 3) + ((lx_b >> (2*k)) & 3) + c;
        if ((sum >= 4) != ((lx_a >> (2*k+1)) & 1)) n_aad2_miss++;
        c = (lx_a >> (2*k+1)) & 1;
      end
      ahi = (lx_a >> 6) & 3; bhi = (lx_b >> 6) & 3;
      if (ahi + bhi + c >= 4 && ahi + bhi < 4) n_aad1_sat++;
      if (ahi + bhi >= 4) n_lx_cmsp++;
      if (((ap_a >> 6) & 3) + ((ap_b >> 6) & 3) >= 4) n_ap_cmsp++;
      if (ref_apex(ap_a, ap_b, 8) != longint'(ap_a) + longint'(ap_b)) n_ap_lsb++;
      for (int j = 0; j < NBOX; j++) if (box_err(mul_a, mul_b, j) != 0) n_mul_box++;
    end
    $display("mechanisms: leadx aad2 carry miss=%0d, leadx aad1 saturation=%0d, leadx carry predicted=%0d",
             n_aad2_miss, n_aad1_sat, n_lx_cmsp);
    $display("            apex carry predicted=%0d, apex low-bit error=%0d, multiplier group miss=%0d",
             n_ap_cmsp, n_ap_lsb, n_mul_box);
    checks += 6;
    if (n_aad2_miss == 0) failures++;
    if (n_aad1_sat == 0)  failures++;
    if (n_lx_cmsp == 0)   failures++;
    if (n_ap_cmsp == 0)   failures++;
    if (n_ap_lsb == 0)    failures++;
    if (n_mul_box == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
