// ripple_adder -- WIDTH-bit carry-ripple adder built from full_adder cells.
//
// Adds the partial product to the accumulator of the serial-parallel
// multiplier: sum = a + b + cin (mod 2^WIDTH), cout is the carry out of the
// top cell. The document names a full-adder based adder; the ripple
// organisation is this design's choice, picked as the smallest adder for a
// datapath that only adds once per clock. WIDTH defaults to 10, the
// N_BITS+2 accumulator width for 8-bit operands. Combinational.
module ripple_adder #(
  parameter int unsigned WIDTH = 10
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
