// aad2 - 2-bit approximate adder without carry chain (low bits of the
// approximate part of LEADx, and the 2x2 dot groups of the multiplier).
//
// Adds a[1:0] + b[1:0] + cin but does not compute the carry: it guesses
// cout = a[1]. The two sum bits are then chosen to keep the error small:
//   - guess right                  -> s is the exact 2-bit sum
//   - guess 0, real carry 1        -> s = 2'b11 (result 3 instead of >= 4)
//   - guess 1, real carry 0        -> s = 2'b00 (result 4 instead of <= 3)
// Over all 32 input combinations 8 are wrong, 2 with error 2 and 6 with
// error 1. All five inputs fit one LUT, so the block is one LUT level and
// the carry to the next group is a wire.
//
// Interface: a = {A_{i+1}, A_i}, b = {B_{i+1}, B_i}, cin = C_i;
// s = {S_{i+1}, S_i}; cout = C_{i+2}. Purely combinational.
// Function and rules follow the original design.
module aad2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);
  logic [2:0] exact;

  always_comb begin
    exact = {1'b0, a} + {1'b0, b} + {2'b00, cin};
    cout  = a[1];
    if (exact[2] == cout) s = exact[1:0];
    else if (!cout)       s = 2'b11;
    else                  s = 2'b00;
  end
endmodule
