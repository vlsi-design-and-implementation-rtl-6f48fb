// leadx - low-error, area-efficient n-bit approximate adder (LEADx).
//
// The sum is split at bit M. The upper N-M bits (MSP) are added exactly by
// exact_adder. The lower M bits (LSP) are approximate and have no carry
// chain, so the LSP costs one LUT level:
//   - bits M-1:M-2  : aad1, which also predicts the carry into the MSP from
//                     these two bit pairs alone (C_MSP = G_{M-1} | P_{M-1}G_{M-2});
//   - bits M-3:0    : (M-2)/2 copies of aad2, 2 bits each. Each group's carry
//                     out is its upper A bit, so the carry into group k is
//                     A_{2k-1} (and cin for the lowest group); the carry into
//                     aad1 is C_{M-2} = A_{M-3}.
// Critical path: A_{M-2} through aad1's carry prediction and the MSP carry
// chain to S_{N-1}.
//
// Interface: a, b (N bits), cin (carry into the lowest aad2) -> s (N bits),
// cout (carry out of the MSP). Combinational.
// Structure follows the original design; the default sizes N=16, M=8 are
// this implementation's choice. M must be even and at least 4.
module leadx #(
  parameter int unsigned N = 16,
  parameter int unsigned M = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  localparam int unsigned G = (M - 2) / 2;  // number of aad2 groups

  if ((M % 2) != 0 || M < 4 || M >= N) begin : g_bad_split
    $error("leadx: M must be even, at least 4 and below N");
  end

  logic [G:0] gc;      // carry into each aad2 group; gc[G] = C_{M-2}
  logic       cmsp;

  assign gc[0] = cin;

  for (genvar k = 0; k < G; k++) begin : g_aad2
    aad2 u_aad2 (
      .a   (a[2*k+1 : 2*k]),
      .b   (b[2*k+1 : 2*k]),
      .cin (gc[k]),
      .s   (s[2*k+1 : 2*k]),
      .cout(gc[k+1])
    );
  end

  aad1 u_aad1 (
    .a   (a[M-1 : M-2]),
    .b   (b[M-1 : M-2]),
    .cin (gc[G]),
    .s   (s[M-1 : M-2]),
    .cmsp(cmsp)
  );

  exact_adder #(.W(N - M)) u_msp (
    .a   (a[N-1 : M]),
    .b   (b[N-1 : M]),
    .cin (cmsp),
    .s   (s[N-1 : M]),
    .cout(cout)
  );
endmodule
