// radix4: N x N signed multiplier using the radix-4 modified Booth algorithm.
//
// The multiplier x is cut into N/2 overlapping 3-bit groups
// {x[2i+1], x[2i], x[2i-1]} (x[-1] = 0); each group is recoded by a
// booth_encode into a digit in {-2..+2}, and a booth_decoder turns the digit
// and the multiplicand y into the partial product digit*y. Partial product i
// is sign-extended and weighted by 4**i (shifted 2i places), and the N/2
// partial products are summed by one carry save adder. Recoding halves the
// number of partial products from N to N/2.
//
// Interface: x (multiplier, encoded) and y (multiplicand), both N-bit two's
// complement; p is the full 2N-bit two's complement product. Purely
// combinational.
//
// The encoder / decoder / carry save adder structure and the recoding follow
// the published radix-4 design. Its netlist has a 15-bit product; this one
// keeps all 2N bits, since (-2**(N-1))**2 needs them, and its low 15 bits
// are the same.
module radix4
  import mult_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  localparam int unsigned NPP = N / 2;

  logic [N:0]      x_ext;  // x with the implicit x[-1] = 0 appended
  logic [2*N-1:0]  ops [NPP];

  assign x_ext = {x, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    booth_digit_t dig;
    logic [N+1:0] pp;
    logic [2*N-1:0] pp_ext;

    booth_encode u_enc (.grp(x_ext[2*i+2 -: 3]), .dig(dig));
    booth_decoder #(.N(N)) u_dec (.b(y), .dig(dig), .pp(pp));

    // Sign-extend to 2N bits, then weight by 4**i.
    assign pp_ext = {{(N-2){pp[N+1]}}, pp};
    assign ops[i] = pp_ext << (2 * i);
  end

  csa #(.NOPS(NPP), .W(2 * N)) u_csa (.ops(ops), .sum(p));

  initial begin
    assert (N >= 4 && N % 2 == 0) else $error("radix4: N must be even and at least 4");
  end

endmodule
