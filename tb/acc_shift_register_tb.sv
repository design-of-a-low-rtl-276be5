// acc_shift_register_tb -- checks the A | Q | q[-1] register: load, hold,
// and arithmetic right shifts by 1..N/2 digits with or without the adder
// sum replacing A. The expected value is computed with a signed integer
// division by 4**k (floor), independent of the shift code in the block.
module acc_shift_register_tb;
  localparam int N  = 8;
  localparam int ND = N / 2;
  localparam int SW = $clog2(ND + 1);
  localparam int RW = 2 * N + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, add_en = 1'b0;
  logic [N-1:0]  multiplier = '0;
  logic [N+1:0]  sum = '0;
  logic [SW-1:0] shift_digits = '0;
  logic [N+1:0]  a_reg;
  logic [N-1:0]  q_reg;
  logic          qm1;
  longint        model = 0;   // signed value of {A, Q, q[-1]}
  int checks = 0, failures = 0;

  acc_shift_register #(.N_BITS(N)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .multiplier(multiplier),
    .add_en(add_en), .sum(sum), .shift_digits(shift_digits),
    .a_reg(a_reg), .q_reg(q_reg), .qm1(qm1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sval(input logic [RW-1:0] r);
    return longint'($signed(r));
  endfunction

  // floor(v / 4**k) for signed v
  function automatic longint fdiv4(input longint v, input int k);
    longint p = longint'(1) << (2 * k);
    longint q = v / p;
    if ((v % p) != 0 && v < 0) q = q - 1;
    return q;
  endfunction

  initial begin
    #12 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 7) == 0);
      multiplier = N'($urandom);
      add_en = 1'($urandom);
      sum = (N+2)'($urandom);
      shift_digits = SW'($urandom_range(0, ND));
      @(posedge clk);
      if (load) begin
        model = sval({{(N+2){1'b0}}, multiplier, 1'b0});
      end else if (shift_digits != 0) begin
        logic [RW-1:0] rm;
        logic [RW-1:0] rc;
        rm    = RW'(model);
        rc    = {add_en ? sum : rm[RW-1 -: N+2], rm[N:0]};
        model = fdiv4(sval(rc), int'(shift_digits));
      end
      #1;
      checks++;
      if (sval({a_reg, q_reg, qm1}) != model) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d reg=%0d expected=%0d", i, sval({a_reg, q_reg, qm1}), model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
