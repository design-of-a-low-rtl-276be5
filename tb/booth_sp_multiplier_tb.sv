// booth_sp_multiplier_tb -- end-to-end test of the radix-4 serial-parallel
// Booth multiplier at its default size (8 x 8 bits, no parameter
// override). Every pair of 8-bit two's complement operands is multiplied:
// 65,536 multiplications, starting with the worked example 90 x -38.
// For each one the testbench checks
//   * the 16-bit product against the integer product a * b;
//   * the latency from the start edge to done against 1 + R, where R is the
//     number of nonzero Booth digits of the multiplier plus its number of
//     runs of zero digits (worked out here from the multiplier's bits);
//   * that done lasts one cycle and ready returns.
// It also counts how often each mechanism of the datapath was used: adds of
// +M, +2M, -M and -2M, shift-only cycles skipping one digit and skipping
// several digits, a multiplier made only of zero digits, and a product
// that needs the two guard bits of the accumulator; one that never happens
// counts as a failure.
module booth_sp_multiplier_tb;
  import booth_pkg::*;

  localparam int N  = 8;
  localparam int ND = N / 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0]   mcand = '0, mplier = '0;
  logic           ready, busy, done;
  logic [2*N-1:0] product;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_add_p1 = 0, n_add_p2 = 0, n_add_m1 = 0, n_add_m2 = 0;
  int n_skip1 = 0, n_skipn = 0, n_all_zero = 0, n_guard = 0;

  booth_sp_multiplier dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .multiplicand(mcand), .multiplier(mplier),
    .ready(ready), .busy(busy), .done(done), .product(product));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
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

  // Observe the datapath each clock.
  always @(posedge clk) begin
    if (rst_n && dut.add_en) begin
      case (digit_value(dut.cur_digit))
        1:  n_add_p1++;
        2:  n_add_p2++;
        -1: n_add_m1++;
        -2: n_add_m2++;
        default: ;
      endcase
      // The sum leaves the N-bit signed range: the guard bits are needed.
      if ($signed(dut.sum) > (2**(N-1) - 1) || $signed(dut.sum) < -(2**(N-1)))
        n_guard++;
    end
    if (rst_n && busy && !dut.add_en) begin
      if (dut.shift_digits == 1) n_skip1++;
      else n_skipn++;
    end
  end

  // Expected number of run cycles for a multiplier.
  function automatic int run_cycles(input logic [N-1:0] y);
    int dig[ND];
    int r, i;
    for (int k = 0; k < ND; k++)
      dig[k] = int'(y[2*k]) + ((k == 0) ? 0 : int'(y[2*k-1])) - 2 * int'(y[2*k+1]);
    r = 0;
    i = 0;
    while (i < ND) begin
      if (dig[i] != 0) i++;
      else while (i < ND && dig[i] == 0) i++;
      r++;
    end
    return r;
  endfunction

  task automatic multiply(input logic [N-1:0] a, input logic [N-1:0] b);
    int lat, exp_lat;
    longint exp_p;
    @(negedge clk);
    check(ready, "not ready");
    mcand  = a;
    mplier = b;
    start  = 1'b1;
    @(negedge clk);
    start  = 1'b0;
    mcand  = N'($urandom);   // operands need not stay valid after start
    mplier = N'($urandom);
    lat = 1;
    while (!done && lat < 4 * ND) begin
      @(negedge clk);
      lat++;
    end
    exp_p   = longint'($signed(a)) * longint'($signed(b));
    exp_lat = 1 + run_cycles(b);
    check($signed(product) == exp_p,
          $sformatf("%0d * %0d = %0d expected %0d", $signed(a), $signed(b), $signed(product), exp_p));
    check(lat == exp_lat,
          $sformatf("%0d * %0d latency %0d expected %0d", $signed(a), $signed(b), lat, exp_lat));
    if (run_cycles(b) == 1 && b == 0) n_all_zero++;
    @(negedge clk);
    check(!done && ready, "done held for more than one cycle");
    check($signed(product) == exp_p, "product not held after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Worked example: 01011010 (90) x 11011010 (-38) = -3420.
    multiply(8'b01011010, 8'b11011010);
    check(product == 16'b1111001010100100, "worked example 90 x -38");
    for (int a = 0; a < (1 << N); a++)
      for (int b = 0; b < (1 << N); b++)
        multiply(N'(a), N'(b));
    $display("adds +M=%0d +2M=%0d -M=%0d -2M=%0d skip1=%0d skipN=%0d all_zero=%0d guard=%0d",
             n_add_p1, n_add_p2, n_add_m1, n_add_m2, n_skip1, n_skipn, n_all_zero, n_guard);
    check(n_add_p1 > 0, "+M never added");
    check(n_add_p2 > 0, "+2M never added");
    check(n_add_m1 > 0, "-M never added");
    check(n_add_m2 > 0, "-2M never added");
    check(n_skip1 > 0, "no single-digit skip");
    check(n_skipn > 0, "no multi-digit skip");
    check(n_all_zero > 0, "no all-zero multiplier");
    check(n_guard > 0, "guard bits never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
