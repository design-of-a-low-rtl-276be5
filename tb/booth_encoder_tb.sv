// booth_encoder_tb -- exhaustive check of the radix-4 Booth recoder.
// Every 3-bit group is applied and the digit compared with
// e = y[2i] + y[2i-1] - 2*y[2i+1], worked out here from the bits.
module booth_encoder_tb;
  import booth_pkg::*;

  logic [2:0]   group;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_encoder dut (.group(group), .digit(digit));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int exp_v;
      group = 3'(g);
      #1;
      exp_v = int'(group[1]) + int'(group[0]) - 2 * int'(group[2]);
      checks++;
      if (digit_value(digit) != exp_v) begin
        failures++;
        $display("FAIL group=%b digit=%0d expected=%0d", group, digit_value(digit), exp_v);
      end
      // Flags must be consistent: a zero digit has neither neg nor two.
      checks++;
      if (!digit.nz && (digit.neg || digit.two)) begin
        failures++;
        $display("FAIL group=%b zero digit with flags %b", group, digit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
