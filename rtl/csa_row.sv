// csa_row - one W-bit 3:2 carry-save layer.
//
// Reduces three rows x, y, z of the same alignment to a sum row s and a
// carry row c (already shifted left by one), with x + y + z == s + c
// modulo 2^W. One full_adder per bit; the carry out of the top bit is
// dropped, so W must cover the final result. Combinational.
// Used for the multiplier's reduction layers after the first; those
// layers being plain full-adder layers is this implementation's choice.
module csa_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] co;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(x[i]), .b(y[i]), .c(z[i]), .s(s[i]), .co(co[i]));
  end

  // co[W-1] is the dropped top carry.
  assign c = {co[W-2:0], 1'b0};
endmodule
