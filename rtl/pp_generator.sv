// pp_generator -- partial-product selector of the radix-4 Booth multiplier.
//
// Forms the addend e_i * M for a Booth digit e_i in {-2,-1,0,+1,+2} and a
// two's complement multiplicand M of N_BITS bits. The multiple is
// N_BITS+2 bits wide so that +-2M always fits as a signed value:
//   * +M  : M sign-extended;
//   * +2M : M shifted left one place with a 0 entering at the bottom;
//   * -M, -2M : the one's complement of +M or +2M, with cin = 1 so that
//     the adder that follows adds the missing 1 of the two's complement;
//   * 0   : all zeros, cin = 0.
// Negation by one's complement plus a carry into the adder, and the
// one-place shift for 2M, follow the document. Combinational.
module pp_generator
  import booth_pkg::*;
#(
  parameter int unsigned N_BITS = 8
) (
  input  logic [N_BITS-1:0] multiplicand,
  input  booth_digit_t      digit,
  output logic [N_BITS+1:0] pp,   // selected multiple, inverted if negative
  output logic              cin   // 1 completes the negation in the adder
);

  logic [N_BITS+1:0] m_ext;   // +M, sign-extended to N_BITS+2 bits
  logic [N_BITS+1:0] mag;     // +M, +2M or 0

  always_comb begin
    m_ext = {{2{multiplicand[N_BITS-1]}}, multiplicand};
    if (!digit.nz)
      mag = '0;
    else if (digit.two)
      mag = {m_ext[N_BITS:0], 1'b0};
    else
      mag = m_ext;
    pp  = digit.neg ? ~mag : mag;
    cin = digit.neg;
  end

endmodule
