// vedic_8: 8x8-bit unsigned Vedic multiplier built from four vedic_4 blocks,
// giving a 16-bit product.
//
// With a = {aH, aL} and b = {bH, bL} (4-bit halves) the four 4x4 products are
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (8 bits each).
// q0[3:0] is the low nibble of the result; the rest is one carry save
// addition of three 12-bit operands, q1 + q2 + {q3, q0[7:4]}, giving y[15:4].
// All four sub-products are formed in parallel, so the only carry
// propagation is the one final adder inside each carry save addition.
// The four-block construction and the use of a carry save adder follow the
// published description; the arrangement of that adder is this design's own.
// Purely combinational; no clock.
module vedic_8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] y
);

  logic [7:0] q0, q1, q2, q3;

  vedic_4 u_q0 (.a(a[3:0]), .b(b[3:0]), .y(q0));
  vedic_4 u_q1 (.a(a[7:4]), .b(b[3:0]), .y(q1));
  vedic_4 u_q2 (.a(a[3:0]), .b(b[7:4]), .y(q2));
  vedic_4 u_q3 (.a(a[7:4]), .b(b[7:4]), .y(q3));

  logic [11:0] ops [3];
  assign ops[0] = {4'h0, q1};
  assign ops[1] = {4'h0, q2};
  assign ops[2] = {q3, q0[7:4]};

  csa #(.NOPS(3), .W(12)) u_add (.ops(ops), .sum(y[15:4]));

  assign y[3:0] = q0[3:0];

endmodule
