// booth_sp_multiplier_wide_tb -- the multiplier at 16 x 16 bits, with
// random operands and the extreme values, checking products against the
// integer product and latencies against 1 + R (R = nonzero Booth digits
// plus runs of zero digits of the multiplier).
module booth_sp_multiplier_wide_tb;
  localparam int N  = 16;
  localparam int ND = N / 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0]   mcand = '0, mplier = '0;
  logic           ready, busy, done;
  logic [2*N-1:0] product;
  int checks = 0, failures = 0;
  int max_lat = 0, min_lat = 1000;

  booth_sp_multiplier #(.N_BITS(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .multiplicand(mcand), .multiplier(mplier),
    .ready(ready), .busy(busy), .done(done), .product(product));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
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
    int lat;
    longint exp_p;
    @(negedge clk);
    check(ready, "not ready");
    mcand  = a;
    mplier = b;
    start  = 1'b1;
    @(negedge clk);
    start  = 1'b0;
    lat = 1;
    while (!done && lat < 4 * ND) begin
      @(negedge clk);
      lat++;
    end
    exp_p = longint'($signed(a)) * longint'($signed(b));
    check($signed(product) == exp_p,
          $sformatf("%0d * %0d = %0d expected %0d", $signed(a), $signed(b), $signed(product), exp_p));
    check(lat == 1 + run_cycles(b),
          $sformatf("%0d * %0d latency %0d expected %0d", $signed(a), $signed(b), lat, 1 + run_cycles(b)));
    if (lat > max_lat) max_lat = lat;
    if (lat < min_lat) min_lat = lat;
  endtask

  initial begin
    logic [N-1:0] edges[6];
    edges = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h5555};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (edges[i])
      foreach (edges[j])
        multiply(edges[i], edges[j]);
    for (int t = 0; t < 20000; t++)
      multiply(N'($urandom), N'($urandom));
    $display("latency range %0d..%0d cycles", min_lat, max_lat);
    check(min_lat == 2 && max_lat == 1 + ND, "latency range not covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
