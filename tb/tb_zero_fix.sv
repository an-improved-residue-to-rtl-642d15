// tb_zero_fix: exhaustive self-checking test of zero_fix at W = 16.
//
// Every 16-bit input is applied, one per time unit. The output must be zero
// for the all-ones input and equal to the input otherwise. A watchdog ends
// a hung run.
module tb_zero_fix;

  localparam int unsigned W = 16;

  logic [W-1:0] a, d;
  int checks   = 0;
  int failures = 0;

  zero_fix #(.W(W)) dut (.a(a), .d(d));

  initial begin : watchdog
    #((1 << W) + 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_d;
    for (int v = 0; v < (1 << W); v++) begin
      a = W'(v);
      #1;
      exp_d = (v == (1 << W) - 1) ? '0 : W'(v);
      checks++;
      if (d != exp_d) begin
        failures++;
        if (failures < 10) $display("a=%h d=%h expected %h", a, d, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
