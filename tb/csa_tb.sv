// csa_tb: random and corner-case operands for carry save adders of 2, 3, 4
// and 9 operands; each result is compared with the modulo-2**W sum worked
// out in the testbench.
module csa_tb;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 16;

  logic [W-1:0] o2 [2];  logic [W-1:0] s2;
  logic [W-1:0] o3 [3];  logic [W-1:0] s3;
  logic [W-1:0] o4 [4];  logic [W-1:0] s4;
  logic [W-1:0] o9 [9];  logic [W-1:0] s9;

  csa #(.NOPS(2), .W(W)) dut2 (.ops(o2), .sum(s2));
  csa             dut3 (.ops(o3), .sum(s3));   // default NOPS=3, W=16
  csa #(.NOPS(4), .W(W)) dut4 (.ops(o4), .sum(s4));
  csa #(.NOPS(9), .W(W)) dut9 (.ops(o9), .sum(s9));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", tag, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [W-1:0] e2, e3, e4, e9;
      e2 = '0; e3 = '0; e4 = '0; e9 = '0;
      for (int i = 0; i < 9; i++) begin
        logic [W-1:0] v;
        // First iterations: all-ones operands, the worst carry chains.
        v = (t < 4) ? '1 : W'($urandom);
        if (t == 1) v = W'(16'h8000);
        if (i < 2) begin o2[i] = v; e2 += v; end
        if (i < 3) begin o3[i] = v; e3 += v; end
        if (i < 4) begin o4[i] = v; e4 += v; end
        o9[i] = v; e9 += v;
      end
      @(posedge clk);
      check("csa2", s2, e2);
      check("csa3", s3, e3);
      check("csa4", s4, e4);
      check("csa9", s9, e9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
