// csa: multi-operand carry save adder.
//
// Adds NOPS operands of W bits each, modulo 2**W. The operands are folded in
// one at a time by rows of full adders (3:2 compressors): each row takes the
// running sum vector, the running carry vector shifted one place left and the
// next operand, and produces a new sum and carry vector without propagating
// any carry along the row. Only the last step, one ripple-carry adder made of
// full adders, joins the sum and carry vectors into the final result.
// With NOPS = 2 there is no carry save row and the block is a plain
// ripple-carry adder.
//
// Keeping sum and carry apart until the end, and finishing with one adder, is
// the carry save principle; the linear chain of rows (rather than a tree) and
// the ripple-carry final adder are this design's own choices.
//
// Interface: ops[NOPS] in, sum out; purely combinational. Callers sign- or
// zero-extend the operands to W bits themselves.
module csa #(
  parameter int unsigned NOPS = 3,
  parameter int unsigned W    = 16
) (
  input  logic [W-1:0] ops [NOPS],
  output logic [W-1:0] sum
);

  // Running sum / carry vectors after each row. Row r (r >= 1) adds ops[r+1].
  logic [W-1:0] s_v [NOPS-1];
  logic [W-1:0] c_v [NOPS-1];

  // Start: the first two operands are sum and carry vectors of their own.
  assign s_v[0] = ops[0];
  assign c_v[0] = ops[1];

  for (genvar r = 1; r < NOPS - 1; r++) begin : g_row
    logic [W-1:0] cin_v;
    logic [W-1:0] cout_v;
    // Carry vector of the previous row enters one bit position higher,
    // except in the first row where ops[1] is an ordinary operand.
    if (r == 1) begin : g_first
      assign cin_v = c_v[0];
    end else begin : g_next
      assign cin_v = {c_v[r-1][W-2:0], 1'b0};
    end
    for (genvar i = 0; i < W; i++) begin : g_bit
      fa u_fa (
        .a (s_v[r-1][i]),
        .b (cin_v[i]),
        .ci(ops[r+1][i]),
        .s (s_v[r][i]),
        .co(cout_v[i])
      );
    end
    assign c_v[r] = cout_v;
  end

  // Final carry-propagate adder: s + (c << 1), or ops[0] + ops[1] when NOPS == 2.
  logic [W-1:0] fin_b;
  logic [W:0]   rc;

  if (NOPS == 2) begin : g_two
    assign fin_b = c_v[0];
  end else begin : g_many
    assign fin_b = {c_v[NOPS-2][W-2:0], 1'b0};
  end

  assign rc[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_rca
    fa u_fa (
      .a (s_v[NOPS-2][i]),
      .b (fin_b[i]),
      .ci(rc[i]),
      .s (sum[i]),
      .co(rc[i+1])
    );
  end

  // The carry out of the top bit is dropped: the sum is modulo 2**W.
  logic unused_carry;
  assign unused_carry = rc[W];

  initial begin
    assert (NOPS >= 2) else $error("csa: NOPS must be at least 2");
  end

endmodule
