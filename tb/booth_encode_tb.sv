// booth_encode_tb: all eight 3-bit groups against the radix-4 recoding table
// (digit values written out below), checking the digit value and that a zero
// digit has all fields clear.
module booth_encode_tb
  import mult_pkg::*;
;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [2:0]   grp;
  booth_digit_t dig;

  booth_encode dut (.grp(grp), .dig(dig));

  // Radix-4 recoding table, index = group bits.
  localparam int TABLE [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int val;
      grp = 3'(g);
      @(posedge clk);
      val = dig.two ? 2 : (dig.one ? 1 : 0);
      if (dig.neg) val = -val;
      checks++;
      if (val != TABLE[g] || (dig.one && dig.two) || (TABLE[g] == 0 && dig != '0)) begin
        failures++;
        $display("FAIL group %03b -> neg=%0b two=%0b one=%0b, expected %0d",
                 grp, dig.neg, dig.two, dig.one, TABLE[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
