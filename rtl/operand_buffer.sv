// operand_buffer -- parallel holding register for an operand.
//
// Captures d on the rising clock edge when load is high and holds it
// otherwise, so the multiplicand stays stable at the partial-product
// selector for the whole multiplication. Active-low asynchronous reset
// clears it to zero (the reset behaviour is this design's choice).
module operand_buffer #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= '0;
    else if (load)
      q <= d;
  end

endmodule
