// fir_filter: direct-form FIR filter whose taps are 8x8 Vedic multipliers and
// whose adder is a multi-operand carry save adder.
//
//   y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k]
//
// A shift register of TAPS samples holds x[n] .. x[n-TAPS+1]. Every tap
// multiplies its sample by its coefficient in a vedic_8; the TAPS 16-bit
// products are zero-extended to OUT_W bits and summed by one csa (rows of
// full adders, one final carry-propagate adder). The sum is registered.
//
// Data and coefficients are unsigned 8-bit numbers, the operand format of the
// Vedic multiplier. OUT_W = 16 + clog2(TAPS) bits hold the full sum, so the
// output never overflows. Building the filter from Vedic multipliers and a
// carry save adder follows the design description; the tap count, the
// coefficient port, the handshake and the register placement are this
// design's own choices.
//
// Interface and timing:
//   in_valid/x_in  a sample is taken on every rising clk edge with in_valid
//                  high; with in_valid low the delay line holds (a stall).
//   coef[k]        h[k]; expected to be held constant while filtering.
//   y_out          registered; out_valid pulses for one cycle with the
//                  output for a sample one clk edge after the sample was
//                  taken (two cycles after it was presented) and y_out then
//                  holds until the next result.
//   rst_n          asynchronous, active low: clears the delay line (so the
//                  filter starts from zero history), y_out and out_valid.
module fir_filter
  import mult_pkg::*;
#(
  parameter int unsigned TAPS  = 8,
  parameter int unsigned OUT_W = 2 * DATA_W + $clog2(TAPS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [DATA_W-1:0]   x_in,
  input  logic [DATA_W-1:0]   coef [TAPS],
  output logic [OUT_W-1:0]    y_out,
  output logic                out_valid
);

  localparam int unsigned PROD_W = 2 * DATA_W;

  // ---- delay line -------------------------------------------------------
  logic [DATA_W-1:0] x_d [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) x_d[k] <= '0;
    end else if (in_valid) begin
      x_d[0] <= x_in;
      for (int k = 1; k < TAPS; k++) x_d[k] <= x_d[k-1];
    end
  end

  // ---- one Vedic multiplier per tap -------------------------------------
  logic [OUT_W-1:0] ops [TAPS];

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    logic [PROD_W-1:0] prod;
    vedic_8 u_mul (.a(x_d[k]), .b(coef[k]), .y(prod));
    assign ops[k] = OUT_W'(prod);
  end

  // ---- carry save accumulation of all taps -------------------------------
  logic [OUT_W-1:0] sum;

  csa #(.NOPS(TAPS), .W(OUT_W)) u_sum (.ops(ops), .sum(sum));

  // ---- output register ----------------------------------------------------
  logic v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
      if (v_q) y_out <= sum;
    end
  end

  initial begin
    assert (TAPS >= 2) else $error("fir_filter: TAPS must be at least 2");
    assert (OUT_W >= PROD_W) else $error("fir_filter: OUT_W too narrow");
  end

endmodule
