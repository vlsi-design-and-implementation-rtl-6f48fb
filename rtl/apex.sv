// apex - area- and power-efficient n-bit approximate adder (APEx).
//
// Like leadx, the upper N-M bits are added exactly and fed a carry that
// aad1 predicts from bits M-1:M-2. Below that, APEx spends no logic at all:
// sum bits S_0..S_{M-3} are the constant 1 and the carry into aad1 is the
// constant 0. Constant ones give a smaller worst-case error (2^(M-2)-1 from
// the low bits) than truncation to zeros.
//
// Interface: a, b (N bits) -> s (N bits), cout (carry out of the MSP).
// No carry in. Combinational. Structure follows the original design, which
// prints 0 on the aad1 carry input; the default sizes N=16, M=8 are this
// implementation's choice. M must be even and at least 4.
//
// Circuit note: a[M-3:0] and b[M-3:0] are unused by construction, and
// s[M-3:0] is constant; that is the design, not an omission.
module apex #(
  parameter int unsigned N = 16,
  parameter int unsigned M = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);
  if ((M % 2) != 0 || M < 4 || M >= N) begin : g_bad_split
    $error("apex: M must be even, at least 4 and below N");
  end

  logic cmsp;

  assign s[M-3:0] = '1;

  aad1 u_aad1 (
    .a   (a[M-1 : M-2]),
    .b   (b[M-1 : M-2]),
    .cin (1'b0),
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
