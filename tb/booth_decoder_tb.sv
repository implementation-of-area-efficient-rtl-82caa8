// booth_decoder_tb: every 8-bit signed multiplicand with each of the five
// radix-4 digits; the 10-bit partial product must equal digit * B.
module booth_decoder_tb
  import mult_pkg::*;
;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0]   b;
  booth_digit_t dig;
  logic [9:0]   pp;

  booth_decoder #(.N(8)) dut (.b(b), .dig(dig), .pp(pp));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -2; d <= 2; d++) begin
      dig.neg = (d < 0);
      dig.two = (d == 2 || d == -2);
      dig.one = (d == 1 || d == -1);
      for (int v = -128; v < 128; v++) begin
        b = 8'(v);
        @(posedge clk);
        checks++;
        if (int'($signed(pp)) != d * v) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", d, v, $signed(pp));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
