// approx_arith_top - the approximate arithmetic units side by side.
//
// Holds the three proposed units, each with its own ports and no shared
// logic: the 8x8 approximate multiplier (approx_mult8), a LEADx adder and
// an APEx adder, both ADD_N bits wide with an ADD_M-bit approximate part.
// Everything is combinational: outputs follow inputs after the logic delay.
//
// Interface: mul_a, mul_b -> mul_p; lx_a, lx_b, lx_cin -> lx_s, lx_cout;
// ap_a, ap_b -> ap_s, ap_cout. The units follow the original design; placing
// them in one top is only a packaging choice, and ADD_N = 16, ADD_M = 8
// are this implementation's defaults. apex leaves the low ADD_M-2 bits of
// its inputs unused by design.
module approx_arith_top #(
  parameter int unsigned ADD_N = 16,
  parameter int unsigned ADD_M = 8
) (
  input  logic [7:0]       mul_a,
  input  logic [7:0]       mul_b,
  output logic [15:0]      mul_p,
  input  logic [ADD_N-1:0] lx_a,
  input  logic [ADD_N-1:0] lx_b,
  input  logic             lx_cin,
  output logic [ADD_N-1:0] lx_s,
  output logic             lx_cout,
  input  logic [ADD_N-1:0] ap_a,
  input  logic [ADD_N-1:0] ap_b,
  output logic [ADD_N-1:0] ap_s,
  output logic             ap_cout
);
  approx_mult8 u_mult (.a(mul_a), .b(mul_b), .p(mul_p));

  leadx #(.N(ADD_N), .M(ADD_M)) u_leadx (
    .a(lx_a), .b(lx_b), .cin(lx_cin), .s(lx_s), .cout(lx_cout)
  );

  apex #(.N(ADD_N), .M(ADD_M)) u_apex (
    .a(ap_a), .b(ap_b), .s(ap_s), .cout(ap_cout)
  );
endmodule
