// tb_csa_row - checks csa_row: x + y + z == s + c modulo 2^W, and no bit
// position carries more than the two output rows allow.
module tb_csa_row;
  logic [15:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa_row dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 20000; v++) begin
      x = 16'($urandom); y = 16'($urandom); z = 16'($urandom);
      if (v < 8) begin x = v[0] ? '1 : '0; y = v[1] ? '1 : '0; z = v[2] ? '1 : '0; end
      #1;
      checks += 2;
      if (16'(x + y + z) !== 16'(s + c)) begin
        failures++;
        if (failures < 10) $display("FAIL %h %h %h -> %h %h", x, y, z, s, c);
      end
      if (s !== (x ^ y ^ z) || c[0] !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
