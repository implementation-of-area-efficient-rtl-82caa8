// vedic_8_tb: first the operand pairs of the reference simulation run of the
// 8x8 Vedic multiplier (40h*40h = 1000h, 21h*70h = 0E70h, ...), then all
// 65536 operand pairs against the unsigned product.
module vedic_8_tb;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0]  a, b;
  logic [15:0] y;

  vedic_8 dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] exp);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %h * %h -> %h expected %h", a, b, y, exp);
    end
  endtask

  // Operand pairs and products as printed in the reference waveform.
  localparam logic [7:0]  FA [5] = '{8'h40, 8'h01, 8'h21, 8'h01, 8'h11};
  localparam logic [7:0]  FB [5] = '{8'h40, 8'h60, 8'h70, 8'h50, 8'h40};
  localparam logic [15:0] FY [5] = '{16'h1000, 16'h0060, 16'h0E70, 16'h0050, 16'h0440};

  initial begin
    for (int k = 0; k < 5; k++) begin
      a = FA[k]; b = FB[k];
      @(posedge clk);
      check(FY[k]);
    end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        check(16'(i * j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
