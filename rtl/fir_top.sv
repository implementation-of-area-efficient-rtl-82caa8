// fir_top: the two arithmetic designs side by side.
//
//  * u_fir  - the FIR filter whose taps are 8x8 Vedic multipliers and whose
//             adder is a carry save adder (the area-efficient filter).
//  * u_booth - the radix-4 modified Booth 8x8 signed multiplier, the lower
//             power alternative multiplier, with its own ports.
//
// The two share nothing but the package. See fir_filter and radix4 for
// timing: the filter is clocked (two-cycle latency from a presented sample
// to out_valid), the Booth multiplier is combinational.
module fir_top
  import mult_pkg::*;
#(
  parameter int unsigned TAPS  = 8,
  parameter int unsigned OUT_W = 2 * DATA_W + $clog2(TAPS),
  parameter int unsigned BM_N  = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // FIR filter
  input  logic                in_valid,
  input  logic [DATA_W-1:0]   x_in,
  input  logic [DATA_W-1:0]   coef [TAPS],
  output logic [OUT_W-1:0]    y_out,
  output logic                out_valid,
  // radix-4 Booth multiplier
  input  logic [BM_N-1:0]     bm_x,
  input  logic [BM_N-1:0]     bm_y,
  output logic [2*BM_N-1:0]   bm_p
);

  fir_filter #(.TAPS(TAPS), .OUT_W(OUT_W)) u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x_in     (x_in),
    .coef     (coef),
    .y_out    (y_out),
    .out_valid(out_valid)
  );

  radix4 #(.N(BM_N)) u_booth (
    .x(bm_x),
    .y(bm_y),
    .p(bm_p)
  );

endmodule
