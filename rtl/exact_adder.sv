// exact_adder - exact W-bit adder with carry in and carry out.
//
// Used as the accurate upper part (MSP) of LEADx and APEx, where it adds
// A[n-1:m] + B[n-1:m] + C_MSP, and as the final carry-propagate adder of
// the multiplier. Written as a propagate/generate ripple chain, the form
// an FPGA maps onto one LUT per bit plus the dedicated carry chain.
//
// Interface: a, b (W bits), cin -> s (W bits), cout. Combinational.
// The function follows the original design; the ripple form is this
// implementation's choice.
module exact_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | ((a[i] ^ b[i]) & c[i]);
  end

  assign cout = c[W];
endmodule
