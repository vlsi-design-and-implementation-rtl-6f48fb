// full_adder - 1-bit full adder (3:2 counter) for partial-product reduction.
// Three bits of one weight in, a sum of the same weight and a carry of the
// next weight out. Combinational. Standard function, as the reduction
// stages of the multiplier require.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ c;
  assign co = (a & b) | (a & c) | (b & c);
endmodule
