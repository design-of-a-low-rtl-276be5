// booth_sp_multiplier -- radix-4 serial-parallel Booth multiplier that adds
// only the nonzero Booth digits.
//
// Multiplies two N_BITS-bit two's complement numbers. The multiplicand is
// held in parallel in a buffer register; the multiplier is consumed two
// bits (one radix-4 Booth digit) at a time from the Q part of the A|Q
// shift register. Each cycle the control logic either adds the partial
// product (+-M or +-2M from the selector) to A through a ripple-carry
// adder and shifts one digit, or, when the current digit is zero, shifts
// past the whole run of zero digits without touching the adder.
//
// Interface: pulse start with the operands while ready is high. busy is
// high while digits are being consumed. done is
// high for one cycle when product is valid; product then holds its value
// until the next start. Latency from the start edge to done is
// 1 + R cycles, where R (1..N_BITS/2) is the number of nonzero digits plus
// the number of runs of zero digits in the multiplier's recoding.
// The block structure (multiplicand buffer, Booth encoder, partial
// product, adder, shift-and-add control, A and Q registers) follows the
// document; widths, handshake and reset (asynchronous, active low) are
// this design's choices. N_BITS defaults to 8.
module booth_sp_multiplier
  import booth_pkg::*;
#(
  parameter int unsigned N_BITS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [N_BITS-1:0]   multiplicand,
  input  logic [N_BITS-1:0]   multiplier,
  output logic                ready,
  output logic                busy,     // a multiplication is in progress
  output logic                done,
  output logic [2*N_BITS-1:0] product
);

  localparam int unsigned N_DIG = N_BITS / 2;
  localparam int unsigned SW    = $clog2(N_DIG + 1);

  logic              load;
  logic              add_en;
  logic [SW-1:0]     shift_digits;
  booth_digit_t      cur_digit;
  ctrl_state_t       state;
  logic [N_BITS-1:0] m_reg;
  logic [N_BITS+1:0] a_reg;
  logic [N_BITS-1:0] q_reg;
  logic              qm1;
  logic [N_BITS+1:0] pp;
  logic              pp_cin;
  logic [N_BITS+1:0] sum;
  logic              sum_cout;   // unused: A is wide enough for any sum

  operand_buffer #(.WIDTH(N_BITS)) u_mcand_buf (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .d    (multiplicand),
    .q    (m_reg)
  );

  shift_add_ctrl #(.N_BITS(N_BITS)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .q_reg       (q_reg),
    .qm1         (qm1),
    .ready       (ready),
    .load        (load),
    .add_en      (add_en),
    .shift_digits(shift_digits),
    .cur_digit   (cur_digit),
    .done        (done),
    .state       (state)
  );

  pp_generator #(.N_BITS(N_BITS)) u_ppgen (
    .multiplicand(m_reg),
    .digit       (cur_digit),
    .pp          (pp),
    .cin         (pp_cin)
  );

  ripple_adder #(.WIDTH(N_BITS + 2)) u_adder (
    .a   (a_reg),
    .b   (pp),
    .cin (pp_cin),
    .sum (sum),
    .cout(sum_cout)
  );

  acc_shift_register #(.N_BITS(N_BITS)) u_acc (
    .clk         (clk),
    .rst_n       (rst_n),
    .load        (load),
    .multiplier  (multiplier),
    .add_en      (add_en),
    .sum         (sum),
    .shift_digits(shift_digits),
    .a_reg       (a_reg),
    .q_reg       (q_reg),
    .qm1         (qm1)
  );

  assign busy    = (state == ST_RUN);
  assign product = {a_reg[N_BITS-1:0], q_reg};

endmodule
