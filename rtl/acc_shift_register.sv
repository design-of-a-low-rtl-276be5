// acc_shift_register -- the A | Q | q[-1] register of the serial-parallel
// Booth multiplier.
//
// One register of 2*N_BITS+3 bits, from the top down:
//   A     N_BITS+2 bits  accumulator (high half of the running product); the
//                        two extra bits keep the sign of A + (+-2M), so no
//                        separate carry flip-flop is needed
//   Q     N_BITS bits    multiplier; as it shifts out, the low half of the
//                        product shifts in from A
//   q[-1] 1 bit          bit shifted out of Q, the low bit of the next
//                        three-bit Booth group (0 at the start)
// load clears A and q[-1] and puts the multiplier in Q. On a cycle with
// shift_digits = k > 0 the register (with A replaced by the adder sum when
// add_en is high) shifts arithmetically right by 2*k bits, i.e. k Booth
// digits, copying the sign of A into the vacated bits. shift_digits = 0
// holds. After all N_BITS/2 digits have been shifted, {A[N_BITS-1:0], Q} is
// the 2*N_BITS-bit product.
// The A / Q split, the two-place shift and the sign extension follow the
// document's block diagram and recurrence; shifting several digits in one
// cycle is this design's way of skipping runs of zero digits.
// Timing: all updates on the rising clock edge; asynchronous active-low
// reset clears the whole register.
module acc_shift_register #(
  parameter int unsigned N_BITS = 8,
  localparam int unsigned N_DIG = N_BITS / 2,
  localparam int unsigned SW    = $clog2(N_DIG + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,          // start: A = 0, Q = multiplier
  input  logic [N_BITS-1:0] multiplier,
  input  logic              add_en,        // take the adder sum into A
  input  logic [N_BITS+1:0] sum,           // A + partial product
  input  logic [SW-1:0]     shift_digits,  // digits to shift (0 = hold)
  output logic [N_BITS+1:0] a_reg,
  output logic [N_BITS-1:0] q_reg,
  output logic              qm1
);

  localparam int unsigned RW = 2 * N_BITS + 3;

  logic [RW-1:0] r_now;
  logic [RW-1:0] r_next;

  always_comb begin
    r_now  = {add_en ? sum : a_reg, q_reg, qm1};
    r_next = RW'($signed(r_now) >>> (2 * shift_digits));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg <= '0;
      q_reg <= '0;
      qm1   <= 1'b0;
    end else if (load) begin
      a_reg <= '0;
      q_reg <= multiplier;
      qm1   <= 1'b0;
    end else if (shift_digits != '0) begin
      {a_reg, q_reg, qm1} <= r_next;
    end
  end

endmodule
