// pp_generator_tb -- exhaustive check of the partial-product selector for
// 8-bit multiplicands: for every multiplicand and every digit in
// {-2,-1,0,+1,+2}, the signed value of pp plus cin must equal digit * M.
module pp_generator_tb;
  import booth_pkg::*;

  localparam int N = 8;
  logic [N-1:0]   m;
  booth_digit_t   d;
  logic [N+1:0]   pp;
  logic           cin;
  int checks = 0, failures = 0;

  pp_generator #(.N_BITS(N)) dut (.multiplicand(m), .digit(d), .pp(pp), .cin(cin));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int mi = 0; mi < (1 << N); mi++) begin
      for (int dv = -2; dv <= 2; dv++) begin
        int got, exp_v;
        m     = N'(mi);
        d.nz  = (dv != 0);
        d.neg = (dv < 0);
        d.two = (dv == 2 || dv == -2);
        #1;
        got   = int'($signed(pp)) + int'(cin);
        exp_v = dv * int'($signed(m));
        checks++;
        if (got != exp_v) begin
          failures++;
          if (failures < 10)
            $display("FAIL m=%0d digit=%0d pp+cin=%0d expected=%0d",
                     $signed(m), dv, got, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
