// full_adder -- one-bit full adder cell, the element the accumulator adder
// of the multiplier is chained from. sum = a ^ b ^ cin, cout = majority.
// Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
