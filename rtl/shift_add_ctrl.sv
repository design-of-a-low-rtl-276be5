// shift_add_ctrl -- shift-and-add control logic with zero-digit skipping.
//
// Sequences one radix-4 Booth multiplication of N_BITS-bit operands, which
// has N_DIG = N_BITS/2 digits. It recodes every remaining digit of the
// multiplier held in Q (with q[-1]) and, each cycle of ST_RUN:
//   * if the lowest remaining digit is nonzero, raises add_en (the sum of A
//     and the partial product is written to A) and shifts by one digit;
//   * if it is zero, adds nothing and shifts past the whole run of
//     consecutive zero digits at once (up to the last remaining digit).
// So a multiplication takes (nonzero digits) + (runs of zero digits) cycles
// in ST_RUN, between 1 and N_DIG: its latency depends on the multiplier.
// Adding only the nonzero digits and skipping the zero ones is the idea of
// the document; doing the skip as a multi-digit shift in one clock cycle is
// this design's choice.
// Handshake: ready is high in ST_IDLE; start there gives load for one cycle
// (operands captured) and enters ST_RUN on the next edge. When the last
// digit has been consumed the FSM spends one cycle in ST_DONE with done
// high, then returns to ST_IDLE. Asynchronous active-low reset to ST_IDLE.
module shift_add_ctrl
  import booth_pkg::*;
#(
  parameter int unsigned N_BITS = 8,
  localparam int unsigned N_DIG = N_BITS / 2,
  localparam int unsigned SW    = $clog2(N_DIG + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_BITS-1:0] q_reg,         // multiplier bits still in Q
  input  logic              qm1,           // q[-1]
  output logic              ready,
  output logic              load,
  output logic              add_en,
  output logic [SW-1:0]     shift_digits,
  output booth_digit_t      cur_digit,     // digit of the current group
  output logic              done,
  output ctrl_state_t       state
);

  logic [SW-1:0]      cnt;       // digits still to be consumed
  booth_digit_t       dig [N_DIG];
  logic [N_BITS:0]    qx;        // {Q, q[-1]}
  logic [SW-1:0]      zrun;      // length of the zero run at the bottom

  assign qx = {q_reg, qm1};

  for (genvar k = 0; k < N_DIG; k++) begin : g_enc
    booth_encoder u_enc (
      .group(qx[2*k+2 -: 3]),
      .digit(dig[k])
    );
  end

  assign cur_digit = dig[0];

  // Count consecutive zero digits from the bottom, stopping at the first
  // nonzero digit or at the last digit still to be consumed.
  always_comb begin
    logic stop;
    zrun = '0;
    stop = 1'b0;
    for (int k = 0; k < N_DIG; k++) begin
      if (!stop && (SW'(k) < cnt) && !dig[k].nz)
        zrun = zrun + 1'b1;
      else
        stop = 1'b1;
    end
  end

  always_comb begin
    ready        = (state == ST_IDLE);
    load         = ready && start;
    done         = (state == ST_DONE);
    add_en       = 1'b0;
    shift_digits = '0;
    if (state == ST_RUN) begin
      if (dig[0].nz) begin
        add_en       = 1'b1;
        shift_digits = SW'(1);
      end else begin
        shift_digits = zrun;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          state <= ST_RUN;
          cnt   <= SW'(N_DIG);
        end
        ST_RUN: begin
          cnt <= cnt - shift_digits;
          if (cnt == shift_digits)
            state <= ST_DONE;
        end
        ST_DONE: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Every cycle of ST_RUN consumes at least one digit and never more than
  // are left.
  a_run_progress: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_RUN |-> (shift_digits != '0) && (shift_digits <= cnt));

  initial begin
    assert (N_BITS >= 2 && N_BITS % 2 == 0)
      else $error("shift_add_ctrl: N_BITS must be even and at least 2");
  end

endmodule
