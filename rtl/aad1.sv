// aad1 - 2-bit approximate adder with carry prediction (top pair of the
// approximate part of LEADx and APEx).
//
// Adds a[1:0] + b[1:0] + cin, where the pair sits at bit positions m-1:m-2
// of an n-bit adder. Instead of rippling its carry, the pair predicts the
// carry into the accurate upper part from its own bits only:
//     cmsp = G1 | (P1 & G0)      (G = a & b, P = a ^ b)
// The prediction misses a carry only when P1 & P0 & cin; in that case the
// two sum bits are forced to 1 (value 3 instead of 4, error 1). In every
// other case s is the exact 2-bit sum.
//
// Interface: a = {A_{m-1}, A_{m-2}}, b = {B_{m-1}, B_{m-2}}, cin = C_{m-2};
// s = {S_{m-1}, S_{m-2}} (the LUT6_2 outputs O6 and O5), cmsp = carry
// handed to the accurate part. Purely combinational, one LUT level.
//
// The two-MSB carry prediction and the pin assignment follow the original
// design; applying the saturate-to-ones correction of the 2-bit adder aad2
// to this pair is this implementation's reading of it.
module aad1 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cmsp
);
  logic [1:0] g, p;
  logic       miss;

  always_comb begin
    g    = a & b;
    p    = a ^ b;
    cmsp = g[1] | (p[1] & g[0]);
    // Real carry out is cmsp | (p[1] & p[0] & cin); the prediction misses it here.
    miss = p[1] & p[0] & cin;
    s[0] = (p[0] ^ cin) | miss;
    s[1] = (p[1] ^ (g[0] | (p[0] & cin))) | miss;
  end
endmodule
