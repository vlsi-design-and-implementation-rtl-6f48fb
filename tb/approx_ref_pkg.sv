// approx_ref_pkg - reference models for the testbenches.
//
// Integer models of the approximate adders and of the approximate
// multiplier, written from their arithmetic definitions rather than from
// the gate structure of the RTL:
//   - aad2: carry guess = upper A bit; if the guess disagrees with
//     (a + b + cin >= 4) the 2-bit sum saturates towards the guess.
//   - aad1: carry prediction = (a + b >= 4), i.e. ignoring cin; a missed
//     carry saturates the sum to 3.
//   - leadx/apex: exact upper part plus the models above on the low part.
//   - multiplier: a*b plus the error (approximate minus exact value) of
//     each 2x2 dot group of the first reduction layer.
package approx_ref_pkg;

  // Returns {cout, s[1:0]}.
  function automatic logic [2:0] ref_aad2(input int unsigned a, input int unsigned b,
                                          input int unsigned cin);
    int unsigned sum   = a + b + cin;
    int unsigned guess = a / 2;
    int unsigned real_c = (sum >= 4) ? 1 : 0;
    int unsigned s;
    if (guess == real_c) s = sum % 4;
    else if (guess == 0) s = 3;
    else                 s = 0;
    return {guess[0], s[1:0]};
  endfunction

  // Returns {cmsp, s[1:0]}.
  function automatic logic [2:0] ref_aad1(input int unsigned a, input int unsigned b,
                                          input int unsigned cin);
    int unsigned sum  = a + b + cin;
    int unsigned pred = (a + b >= 4) ? 1 : 0;
    int unsigned s    = ((sum >= 4) && pred == 0) ? 3 : sum % 4;
    return {pred[0], s[1:0]};
  endfunction

  // Returns {cout, s} for an adder split at bit m (width up to 62).
  function automatic longint unsigned ref_leadx(input longint unsigned a, input longint unsigned b,
                                                input int unsigned cin, input int m);
    longint unsigned s = 0, hi;
    int unsigned c = cin;
    logic [2:0] r;
    for (int k = 0; k < (m - 2) / 2; k++) begin
      r = ref_aad2((a >> (2*k)) & 3, (b >> (2*k)) & 3, c);
      s |= longint'(r[1:0]) << (2*k);
      c = r[2];
    end
    r = ref_aad1((a >> (m-2)) & 3, (b >> (m-2)) & 3, c);
    s |= longint'(r[1:0]) << (m-2);
    hi = (a >> m) + (b >> m) + r[2];   // exact, may carry into bit n-m
    return s | (hi << m);
  endfunction

  function automatic longint unsigned ref_apex(input longint unsigned a, input longint unsigned b,
                                               input int m);
    longint unsigned s, hi;
    logic [2:0] r;
    s = (64'd1 << (m-2)) - 1;
    r = ref_aad1((a >> (m-2)) & 3, (b >> (m-2)) & 3, 0);
    s |= longint'(r[1:0]) << (m-2);
    hi = (a >> m) + (b >> m) + r[2];
    return s | (hi << m);
  endfunction

  // Partial-product bit at column c, dot row k (1-based) of the 8x8 matrix.
  function automatic int unsigned dot8(input logic [7:0] a, input logic [7:0] b,
                                       input int c, input int k);
    int i = ((c > 7) ? c - 7 : 0) + k - 1;
    if (i > 7 || c - i < 0 || c - i > 7) return 0;
    return (a[c-i] & b[i]) ? 1 : 0;
  endfunction

  // 2x2 groups of the first layer: low column and upper dot row.
  localparam int NBOX = 6;
  localparam int BOX_C [NBOX] = '{1, 3, 5, 3, 5, 5};
  localparam int BOX_R [NBOX] = '{1, 1, 1, 3, 3, 5};

  // Error of 2x2 group j for operands a, b (approximate minus exact value,
  // in units of the group's low column).
  function automatic int box_err(input logic [7:0] a, input logic [7:0] b, input int j);
    int unsigned x = 2*dot8(a, b, BOX_C[j]+1, BOX_R[j])   + dot8(a, b, BOX_C[j], BOX_R[j]);
    int unsigned y = 2*dot8(a, b, BOX_C[j]+1, BOX_R[j]+1) + dot8(a, b, BOX_C[j], BOX_R[j]+1);
    logic [2:0] r = ref_aad2(x, y, 0);
    return int'(r[2]) * 4 + int'(r[1:0]) - int'(x + y);
  endfunction

  function automatic int unsigned ref_mult8(input logic [7:0] a, input logic [7:0] b);
    int p = int'(a) * int'(b);
    for (int j = 0; j < NBOX; j++) p += box_err(a, b, j) * (1 << BOX_C[j]);
    return p;
  endfunction

endpackage
