// vedic_4_tb: exhaustive check of the 4x4 Vedic multiplier against
// the unsigned product of its operands.
module vedic_4_tb;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] y;

  vedic_4 dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        @(posedge clk);
        checks++;
        if (y !== 8'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", i, j, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
