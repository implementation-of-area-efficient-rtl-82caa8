// fir_top_tb: end-to-end test of the top level at its default parameters.
//
// The FIR filter (8 taps of 8x8 Vedic multipliers, carry save adder) is run
// through an impulse, random samples with stalls, an asynchronous reset in
// mid-stream and a full-scale run, against an integer reference model; every
// result and its latency are checked. In the same cycles the radix-4 Booth
// multiplier gets random and corner-case signed operands and is checked
// against the signed product. Each mechanism is counted and must occur:
// accepted samples, stalls, resets, the impulse read-back, the full-scale
// sum, and every one of the five Booth digits -2..+2.
module fir_top_tb
  import mult_pkg::*;
;
  localparam int TAPS  = 8;
  localparam int OUT_W = 2 * DATA_W + $clog2(TAPS);

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              rst_n;
  logic              in_valid;
  logic [DATA_W-1:0] x_in;
  logic [DATA_W-1:0] coef [TAPS];
  logic [OUT_W-1:0]  y_out;
  logic              out_valid;
  logic [7:0]        bm_x, bm_y;
  logic [15:0]       bm_p;

  fir_top dut (.*);

  int unsigned hist [TAPS];
  typedef struct { longint unsigned val; int due; } exp_t;
  exp_t exp_q [$];
  int cyc = 0;
  int n_sample = 0, n_stall = 0, n_reset = 0, n_out = 0, n_full = 0, n_impulse = 0;
  int n_digit [5];          // Booth digits -2..+2 seen, index digit+2
  int n_neg_product = 0;
  int imp_idx = -1;         // >= 0 while the impulse response is read back

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned model_push(int unsigned x);
    longint unsigned s = 0;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    for (int k = 0; k < TAPS; k++) s += longint'(hist[k]) * longint'(coef[k]);
    return s;
  endfunction

  // Radix-4 digits of x, counted independently of the design.
  function automatic void count_digits(logic [7:0] x);
    logic [8:0] xe = {x, 1'b0};
    for (int i = 0; i < 4; i++) begin
      int d = -2 * int'(xe[2*i+2]) + int'(xe[2*i+1]) + int'(xe[2*i]);
      n_digit[d+2]++;
    end
  endfunction

  task automatic check_booth();
    int e = int'($signed(bm_x)) * int'($signed(bm_y));
    checks++;
    count_digits(bm_x);
    if (e < 0) n_neg_product++;
    if (int'($signed(bm_p)) != e) begin
      failures++;
      $display("FAIL booth %0d * %0d -> %0d", $signed(bm_x), $signed(bm_y), $signed(bm_p));
    end
  endtask

  task automatic step(bit v, logic [DATA_W-1:0] x, logic [7:0] bx, logic [7:0] by);
    @(negedge clk);
    in_valid = v;
    x_in     = x;
    bm_x     = bx;
    bm_y     = by;
    @(posedge clk);
    cyc++;
    if (v) begin
      exp_q.push_back('{model_push(32'(x)), cyc + 1});
      n_sample++;
    end else begin
      n_stall++;
    end
    #1;
    check_booth();
    if (out_valid) begin
      checks++;
      n_out++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL cycle %0d: unexpected out_valid", cyc);
      end else begin
        exp_t e = exp_q.pop_front();
        if (e.due != cyc || 64'(y_out) != e.val) begin
          failures++;
          $display("FAIL cycle %0d: y=%0d expected %0d (due %0d)", cyc, y_out, e.val, e.due);
        end
        if (y_out == OUT_W'(TAPS * 255 * 255)) n_full++;
        if (imp_idx >= 0 && imp_idx < TAPS) begin
          checks++;
          if (y_out == OUT_W'(coef[imp_idx])) n_impulse++;
          else begin
            failures++;
            $display("FAIL impulse response h[%0d]: got %0d expected %0d", imp_idx, y_out, coef[imp_idx]);
          end
          imp_idx++;
        end
      end
    end else if (exp_q.size() != 0 && exp_q[0].due <= cyc) begin
      checks++;
      failures++;
      $display("FAIL cycle %0d: result due in cycle %0d missing", cyc, exp_q[0].due);
      void'(exp_q.pop_front());
    end
  endtask

  task automatic rstep(bit v);
    step(v, DATA_W'($urandom), 8'($urandom), 8'($urandom));
  endtask

  initial begin
    in_valid = 1'b0;
    x_in = '0; bm_x = '0; bm_y = '0;
    foreach (coef[k]) coef[k] = DATA_W'($urandom);
    foreach (hist[k]) hist[k] = 0;
    rst_n = 1'b0;
    #12;
    rst_n = 1'b1;

    // Impulse: the output sequence must be the coefficients themselves.
    imp_idx = 0;
    step(1'b1, 8'd1, 8'h80, 8'h80);    // Booth: most negative squared
    for (int k = 1; k < TAPS; k++) step(1'b1, 8'd0, 8'h7f, 8'h80);
    step(1'b0, 8'd0, 8'h55, 8'hAA);
    step(1'b0, 8'd0, 8'hAA, 8'h55);
    checks++;
    if (n_impulse != TAPS) begin
      failures++;
      $display("FAIL impulse response read back %0d of %0d taps", n_impulse, TAPS);
    end
    imp_idx = -1;

    for (int t = 0; t < 500; t++) rstep(($urandom % 4) != 0);

    // Asynchronous reset in mid-stream.
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    #2;
    checks++;
    if (out_valid !== 1'b0 || y_out !== '0) begin
      failures++;
      $display("FAIL reset did not clear the filter outputs");
    end
    foreach (hist[k]) hist[k] = 0;
    exp_q.delete();
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < 200; t++) rstep(($urandom % 3) != 0);

    // Full scale. Coefficients change only once no result is in flight.
    for (int t = 0; t < 2; t++) step(1'b0, '0, 8'h01, 8'hff);
    foreach (coef[k]) coef[k] = '1;
    for (int t = 0; t < 2 * TAPS; t++) step(1'b1, '1, 8'h7f, 8'h7f);
    for (int t = 0; t < 4; t++) step(1'b0, '0, 8'h00, 8'h80);

    // Every mechanism must have happened.
    begin
      int counts [11];
      string names [11];
      counts = '{n_sample, n_stall, n_reset, n_out, n_full, n_impulse,
                n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4]};
      names = '{"samples", "stalls", "resets", "outputs", "full-scale sums",
                 "impulse read-backs", "digit -2", "digit -1", "digit 0",
                 "digit +1", "digit +2"};
      for (int i = 0; i < 11; i++) begin
        checks++;
        $display("  %-20s %0d", names[i], counts[i]);
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", names[i]);
        end
      end
      checks++;
      if (exp_q.size() != 0 || n_neg_product == 0) begin
        failures++;
        $display("FAIL %0d results outstanding, %0d negative products", exp_q.size(), n_neg_product);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
