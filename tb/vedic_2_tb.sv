// vedic_2_tb: exhaustive check of the 2x2 Vedic multiplier against
// the unsigned product of its operands.
module vedic_2_tb;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] y;

  vedic_2 dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        @(posedge clk);
        checks++;
        if (y !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", i, j, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
