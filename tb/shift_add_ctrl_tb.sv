// shift_add_ctrl_tb -- checks the shift-and-add controller on its own.
// The testbench plays the Q | q[-1] register: it loads the multiplier on
// load and shifts it right by 2*shift_digits, filling the vacated top bits
// with random bits (as product bits would), so that the controller must
// ignore bits beyond the digits still to be consumed. For each multiplier
// the expected sequence of (add_en, shift_digits) is derived from its
// Booth digits e_i = y[2i] + y[2i-1] - 2*y[2i+1]: one add cycle per nonzero
// digit, one shift-only cycle per run of zero digits. Also checked: the
// number of run cycles, done for exactly one cycle, ready only when idle.
module shift_add_ctrl_tb;
  import booth_pkg::*;

  localparam int N  = 8;
  localparam int ND = N / 2;
  localparam int SW = $clog2(ND + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0]  q_reg = '0;
  logic          qm1 = 1'b0;
  logic          ready, load, add_en, done;
  logic [SW-1:0] shift_digits;
  booth_digit_t  cur_digit;
  ctrl_state_t   state;
  int checks = 0, failures = 0;

  shift_add_ctrl #(.N_BITS(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .q_reg(q_reg), .qm1(qm1),
    .ready(ready), .load(load), .add_en(add_en), .shift_digits(shift_digits),
    .cur_digit(cur_digit), .done(done), .state(state));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Emulated Q | q[-1] register.
  logic [N-1:0] mult_cur;

  always_ff @(posedge clk) begin
    if (load) begin
      {q_reg, qm1} <= {mult_cur, 1'b0};
    end else if (shift_digits != 0) begin
      logic [N:0] r;
      r = {q_reg, qm1};
      for (int s = 0; s < int'(shift_digits); s++)
        r = {2'($urandom), r[N:2]};
      {q_reg, qm1} <= r;
    end
  end

  initial begin
    #12 rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      int dig[ND];
      int exp_add[$], exp_sh[$];
      int i, cyc, idx;
      mult_cur = (t < 256) ? N'(t) : N'($urandom);
      for (int k = 0; k < ND; k++) begin
        int lo;
        lo = (k == 0) ? 0 : int'(mult_cur[2*k-1]);
        dig[k] = int'(mult_cur[2*k]) + lo - 2 * int'(mult_cur[2*k+1]);
      end
      exp_add.delete();
      exp_sh.delete();
      i = 0;
      while (i < ND) begin
        if (dig[i] != 0) begin
          exp_add.push_back(1); exp_sh.push_back(1); i++;
        end else begin
          int z;
          z = 0;
          while (i < ND && dig[i] == 0) begin z++; i++; end
          exp_add.push_back(0); exp_sh.push_back(z);
        end
      end
      @(negedge clk);
      check(ready && state == ST_IDLE, $sformatf("not ready before multiplier %h", mult_cur));
      start = 1'b1;
      #1 check(load, "load not raised with start in idle");
      @(negedge clk);
      start = 1'b0;
      cyc = 0;
      idx = 0;
      while (state == ST_RUN && cyc < 2 * ND) begin
        check(!ready && !done, "ready or done while running");
        if (cyc < exp_add.size()) begin
          check(add_en == 1'(exp_add[cyc]) && int'(shift_digits) == exp_sh[cyc],
                $sformatf("y=%h step %0d add=%0d shift=%0d expected add=%0d shift=%0d",
                          mult_cur, cyc, add_en, shift_digits, exp_add[cyc], exp_sh[cyc]));
          check(digit_value(cur_digit) == dig[idx],
                $sformatf("y=%h step %0d digit %0d expected %0d",
                          mult_cur, cyc, digit_value(cur_digit), dig[idx]));
          idx += exp_sh[cyc];
        end
        cyc++;
        @(negedge clk);
      end
      check(cyc == exp_add.size(),
            $sformatf("y=%h took %0d run cycles, expected %0d", mult_cur, cyc, exp_add.size()));
      check(done && state == ST_DONE, $sformatf("y=%h done not raised", mult_cur));
      @(negedge clk);
      check(!done && ready, "done longer than one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
