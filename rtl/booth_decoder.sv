// booth_decoder: forms one radix-4 partial product, digit * B.
//
// The multiplicand B is an N-bit two's complement number. The digit selects
// 0, B or 2*B (B shifted one place left), each sign-extended to N+2 bits,
// and a negative digit takes the two's complement of the selection. The
// result pp is the exact N+2-bit two's complement value of digit*B (N+2 bits
// are needed for -2 * -2**(N-1)). Negating inside the decoder, rather than
// passing a "+1" correction bit on to the adder, is this design's choice.
// Purely combinational.
module booth_decoder
  import mult_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]  b,
  input  booth_digit_t  dig,
  output logic [N+1:0]  pp
);

  logic [N+1:0] b_ext;
  logic [N+1:0] mag;

  always_comb begin
    b_ext = {{2{b[N-1]}}, b};
    if (dig.two)      mag = {b_ext[N:0], 1'b0};
    else if (dig.one) mag = b_ext;
    else              mag = '0;
    pp = dig.neg ? (~mag + 1'b1) : mag;
  end

endmodule
