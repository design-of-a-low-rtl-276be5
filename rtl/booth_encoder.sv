// booth_encoder -- radix-4 Booth recoder.
//
// Looks at one overlapping group of three multiplier bits
// {y[2i+1], y[2i], y[2i-1]} (y[-1] = 0) and produces the digit
// e_i = y[2i] + y[2i-1] - 2*y[2i+1]:
//   000 -> 0   001 -> +1  010 -> +1  011 -> +2
//   100 -> -2  101 -> -1  110 -> -1  111 -> 0
// This mapping is the standard radix-4 recoding table. The digit is
// returned as the three flags of booth_pkg::booth_digit_t.
// Purely combinational, no clock.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]   group,  // {y[2i+1], y[2i], y[2i-1]}
  output booth_digit_t digit
);

  always_comb begin
    // Zero for 000 and 111, nonzero otherwise.
    digit.nz  = !(group == 3'b000 || group == 3'b111);
    // Negative when the top bit is set (100, 101, 110); 111 is zero.
    digit.neg = group[2] && digit.nz;
    // Magnitude 2 only for 011 and 100.
    digit.two = (group == 3'b011) || (group == 3'b100);
  end

endmodule
