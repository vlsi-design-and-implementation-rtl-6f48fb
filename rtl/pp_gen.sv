// pp_gen - partial-product generator of an N x N unsigned multiplier.
//
// pp[i][j] = b[i] & a[j] has weight 2^(i+j): row i is the multiplicand
// gated by multiplier bit i (a copy of a, or zero). N*N AND gates,
// combinational. Follows the first multiplication stage of the original
// design; N = 8 as in its multiplier.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = a & {N{b[i]}};
    end
  end
endmodule
