// operand_buffer_tb -- checks that the operand buffer clears on reset,
// captures on load and holds its value while load is low.
module operand_buffer_tb;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [W-1:0] d = '0, q;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  operand_buffer #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'hA5;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = 1'($urandom);
      d    = W'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d q=%h expected %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
