// fir_filter_tb: drives the 8-tap filter with random samples, random stalls
// (in_valid low), an impulse, a full-scale run and an asynchronous reset in
// mid-stream. A reference model in the testbench keeps the sample history
// and computes sum h[k]*x[n-k] in plain integer arithmetic; every result is
// compared with it, and out_valid must come exactly one clock edge after the
// edge that took the sample.
module fir_filter_tb
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

  fir_filter dut (.*);

  // Reference model state.
  int unsigned hist [TAPS];
  typedef struct { longint unsigned val; int due; } exp_t;
  exp_t exp_q [$];
  int cyc = 0;
  int n_stall = 0, n_out = 0;

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

  // One clock cycle: drive at the falling edge, take the model step at the
  // rising edge, then check the registered outputs.
  task automatic step(bit v, logic [DATA_W-1:0] x);
    @(negedge clk);
    in_valid = v;
    x_in     = x;
    @(posedge clk);
    cyc++;
    if (v) exp_q.push_back('{model_push(32'(x)), cyc + 1});
    else   n_stall++;
    #1;
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
          $display("FAIL cycle %0d: y=%0d expected %0d (due cycle %0d)", cyc, y_out, e.val, e.due);
        end
      end
    end else if (exp_q.size() != 0 && exp_q[0].due <= cyc) begin
      checks++;
      failures++;
      $display("FAIL cycle %0d: result due in cycle %0d missing", cyc, exp_q[0].due);
      void'(exp_q.pop_front());
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    #2;
    checks++;
    if (out_valid !== 1'b0 || y_out !== '0) begin
      failures++;
      $display("FAIL reset did not clear the outputs");
    end
    foreach (hist[k]) hist[k] = 0;
    exp_q.delete();
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    in_valid = 1'b0;
    x_in     = '0;
    foreach (coef[k]) coef[k] = DATA_W'($urandom);
    foreach (hist[k]) hist[k] = 0;
    rst_n = 1'b0;
    #12;
    rst_n = 1'b1;

    // Impulse: the outputs must read back the coefficients h[0..TAPS-1].
    step(1'b1, 8'd1);
    for (int k = 1; k < TAPS + 2; k++) step(1'b1, 8'd0);

    // Random samples with random stalls.
    for (int t = 0; t < 400; t++) step(($urandom % 4) != 0, DATA_W'($urandom));

    // Asynchronous reset in mid-stream, then continue from a clean history.
    for (int t = 0; t < 5; t++) step(1'b1, DATA_W'($urandom));
    do_reset();
    for (int t = 0; t < 100; t++) step(($urandom % 3) != 0, DATA_W'($urandom));

    // Full scale: every sample and coefficient at its maximum. Coefficients
    // change only once no result is in flight.
    for (int t = 0; t < 2; t++) step(1'b0, '0);
    foreach (coef[k]) coef[k] = '1;
    for (int t = 0; t < 3 * TAPS; t++) step(1'b1, '1);

    // Drain.
    for (int t = 0; t < 4; t++) step(1'b0, '0);

    checks++;
    if (exp_q.size() != 0 || n_stall == 0 || n_out < 400) begin
      failures++;
      $display("FAIL left %0d results, %0d stalls, %0d outputs", exp_q.size(), n_stall, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
