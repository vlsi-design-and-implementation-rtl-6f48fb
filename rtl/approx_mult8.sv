// approx_mult8 - 8x8 unsigned approximate Wallace-tree multiplier built on
// 2-bit approximate LUT adders.
//
// Three stages, all combinational:
//   1. pp_gen forms the 64 partial-product bits.
//   2. Reduction. The first layer (mult8_stage1) uses half adders, full
//      adders and six aad2 2-bit approximate adders, cutting the tallest
//      column from 8 to 6 dots; this layer is where the approximation
//      enters. The remaining layers are exact 3:2 carry-save rows
//      (csa_row): 6 rows -> 4 -> 3 -> 2.
//   3. exact_adder adds the last two rows into the 16-bit product.
// The result equals a*b plus the errors of the six aad2 groups (each -2..+2
// times the weight of its low column). The largest result, 65025 + 228,
// fits 16 bits.
//
// Interface: a, b (8 bits, unsigned) -> p (16 bits). No clock.
// Stages 1-3 and the first reduction layer follow the original design; the
// carry-save form of the later layers is this implementation's choice.
module approx_mult8 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N != 8) begin : g_bad_n
    $error("approx_mult8: the first reduction layer is defined for N = 8 only");
  end

  localparam int unsigned W = 2 * N;

  logic [N-1:0][N-1:0] pp;
  logic [5:0][W-1:0]   r1;               // after the first layer
  logic [W-1:0]        s2a, c2a, s2b, c2b;  // 6 -> 4
  logic [W-1:0]        s3, c3;           // 4 -> 3
  logic [W-1:0]        s4, c4;           // 3 -> 2
  logic                cout_unused;

  pp_gen #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  mult8_stage1 u_stage1 (.pp(pp), .rows(r1));

  csa_row #(.W(W)) u_csa2a (.x(r1[0]), .y(r1[1]), .z(r1[2]), .s(s2a), .c(c2a));
  csa_row #(.W(W)) u_csa2b (.x(r1[3]), .y(r1[4]), .z(r1[5]), .s(s2b), .c(c2b));
  csa_row #(.W(W)) u_csa3  (.x(s2a),   .y(c2a),   .z(s2b),   .s(s3),  .c(c3));
  csa_row #(.W(W)) u_csa4  (.x(s3),    .y(c3),    .z(c2b),   .s(s4),  .c(c4));

  // The product fits W bits, so the final carry out is always 0.
  exact_adder #(.W(W)) u_cpa (.a(s4), .b(c4), .cin(1'b0), .s(p), .cout(cout_unused));
endmodule
