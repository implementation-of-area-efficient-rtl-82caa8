// vedic_2: 2x2-bit unsigned multiplier after the Urdhva Tiryakbhyam
// ("vertically and crosswise") rule.
//
// Vertical products give the outer columns (a[0]b[0] for the LSB, a[1]b[1]
// for the top), the crosswise products a[1]b[0] and a[0]b[1] form the middle
// column. Two half adders (XOR/AND pairs) resolve the columns:
//   y[0] = a0 b0
//   y[1] = a1 b0 ^ a0 b1            carry c1 = a1 b0 & a0 b1
//   y[2] = a1 b1 ^ c1
//   y[3] = a1 b1 & c1               (the carry bit)
// The bit assignment (y[3] as the carry) follows the published description;
// the half-adder form is the usual one for this scheme. Purely combinational.
module vedic_2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] y
);

  logic c1;

  assign y[0] = a[0] & b[0];
  assign y[1] = (a[1] & b[0]) ^ (a[0] & b[1]);
  assign c1   = (a[1] & b[0]) & (a[0] & b[1]);
  assign y[2] = (a[1] & b[1]) ^ c1;
  assign y[3] = (a[1] & b[1]) & c1;

endmodule
