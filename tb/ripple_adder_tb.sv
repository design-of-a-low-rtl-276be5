// ripple_adder_tb -- checks the 10-bit ripple-carry adder against the
// integer sum a + b + cin, on corner values and random operands.
module ripple_adder_tb;
  localparam int W = 10;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  ripple_adder #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    int unsigned exp_v;
    a = ta; b = tb_; cin = tc;
    #1;
    exp_v = int'(ta) + int'(tb_) + int'(tc);
    checks++;
    if ({cout, sum} != (W+1)'(exp_v)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d + %0d + %0d = %0d expected %0d", ta, tb_, tc, {cout, sum}, exp_v);
    end
  endtask

  initial begin
    check('0, '0, 1'b0);
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check('1, 10'd1, 1'b0);
    for (int i = 0; i < 5000; i++)
      check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
