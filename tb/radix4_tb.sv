// radix4_tb: all 65536 signed 8x8 operand pairs of the radix-4 Booth
// multiplier, plus all pairs of a 6-bit instance, against the signed product.
module radix4_tb;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  x, y;
  logic [15:0] p;
  logic [5:0]  x6, y6;
  logic [11:0] p6;

  radix4             dut  (.x(x),  .y(y),  .p(p));
  radix4 #(.N(6))    dut6 (.x(x6), .y(y6), .p(p6));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x6 = '0; y6 = '0;
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        x = 8'(i); y = 8'(j);
        #1;
        checks++;
        if (int'($signed(p)) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d", i, j, $signed(p));
        end
      end
    end
    for (int i = -32; i < 32; i++) begin
      for (int j = -32; j < 32; j++) begin
        x6 = 6'(i); y6 = 6'(j);
        #1;
        checks++;
        if (int'($signed(p6)) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL6 %0d * %0d -> %0d", i, j, $signed(p6));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
