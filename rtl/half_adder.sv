// half_adder - 1-bit half adder (2:2 counter) for partial-product reduction.
// Two bits of one weight in, a sum of the same weight and a carry of the
// next weight out. Combinational. Standard function.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
