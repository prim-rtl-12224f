// prim8: 8-bit unsigned PRIM8 multiplier (array-compressor, OR-based carry
// disregard).
//
// The 8x8 product is split by the multiplier's nibbles. Group A computes
// a * b[3:0] with the approximate 8x4 multiplier G_X; Group B computes
// a * b[7:4] with the exact 8x4 multiplier G_1. Both run in parallel. The low
// four bits of Group A are product bits 3..0; a 12-bit ripple-carry adder adds
// Group A's upper eight bits to Group B's twelve to give product bits 15..4.
// With APPROX_ADDER = 1 the adder ORs its bits 0..X-5 (product weights 4..X-1,
// the same weights Group A already approximates) and adds the rest exactly.
//
// Naming: X = 4..10 with APPROX_ADDER = 0 is PRIM8_x1R12, X = 5..10 with
// APPROX_ADDER = 1 is PRIM8_x1R(16-x); X = 1 with APPROX_ADDER = 0 is the exact
// multiplier. Purely combinational. The adder's carry out cannot be 1 for
// 8-bit operands (a * b < 2^16 and every approximation only lowers the sum), so
// it is left unconnected. The default, PRIM8_a1R6, is this implementation's
// choice among the thirteen.
module prim8 #(
  parameter int unsigned X            = 10,  // Group A carry-disregard column, 1..10
  parameter bit          APPROX_ADDER = 1'b1 // 1: OR the adder's bits 0..X-5
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  localparam int unsigned OR_BITS = (APPROX_ADDER && X > 4) ? X - 4 : 0;

  logic [11:0] pa, pb, hi;

  prim_mul8x4 #(.X(X)) u_group_a (.a(a), .b(b[3:0]), .p(pa));
  prim_mul8x4 #(.X(1)) u_group_b (.a(a), .b(b[7:4]), .p(pb));

  prim_rca #(.W(12), .OR_BITS(OR_BITS)) u_rca (
    .x({4'b0000, pa[11:4]}), .y(pb), .s(hi), .cout()
  );

  assign p = {hi, pa[3:0]};
endmodule
