// booth_encode: radix-4 modified Booth recoder for one group of multiplier
// bits.
//
// grp = {x[2i+1], x[2i], x[2i-1]} (three bits, one overlapping the previous
// group) is mapped to a digit in {-2,-1,0,+1,+2} exactly as in the radix-4
// recoding table:
//   000 -> 0   001 -> +1   010 -> +1   011 -> +2
//   100 -> -2  101 -> -1   110 -> -1   111 -> 0
// The digit leaves as a booth_digit_t (sign, |digit|==2, |digit|==1); zero
// digits are always given as all-zero fields. Purely combinational.
module booth_encode
  import mult_pkg::*;
(
  input  logic [2:0]   grp,
  output booth_digit_t dig
);

  always_comb begin
    dig.one = grp[1] ^ grp[0];
    dig.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    // 111 is a zero digit, not a negative one.
    dig.neg = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule
