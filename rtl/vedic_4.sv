// vedic_4: 4x4-bit unsigned Vedic multiplier built from four vedic_2 blocks.
//
// With a = {aH, aL} and b = {bH, bL} (2-bit halves) the four 2x2 products are
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH.
// The low two bits of q0 are the low two bits of the result. The remaining
// bits come from one carry save addition of three 6-bit operands:
//   q1 + q2 + {q3, q0[3:2]}
// which gives y[7:2]. The four-block construction and the bypass of the low
// two bits follow the published description; doing the addition as one
// three-operand carry save addition is this design's choice of adder
// arrangement. Purely combinational.
module vedic_4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] y
);

  logic [3:0] q0, q1, q2, q3;

  vedic_2 u_q0 (.a(a[1:0]), .b(b[1:0]), .y(q0));
  vedic_2 u_q1 (.a(a[3:2]), .b(b[1:0]), .y(q1));
  vedic_2 u_q2 (.a(a[1:0]), .b(b[3:2]), .y(q2));
  vedic_2 u_q3 (.a(a[3:2]), .b(b[3:2]), .y(q3));

  logic [5:0] ops [3];
  assign ops[0] = {2'b00, q1};
  assign ops[1] = {2'b00, q2};
  assign ops[2] = {q3, q0[3:2]};

  csa #(.NOPS(3), .W(6)) u_add (.ops(ops), .sum(y[7:2]));

  assign y[1:0] = q0[1:0];

endmodule
