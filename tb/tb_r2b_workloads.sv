// tb_r2b_workloads: the converter at the sizes its cost is evaluated for.
//
// Delay and area of the converter are evaluated for k = 4, 8 and 16, and
// its operand derivation is illustrated with k = 3. This testbench builds a
// converter for k = 3 and k = 4 and checks them on every X in the dynamic
// range; k = 8 is checked exhaustively by tb_r2b_converter. The k = 16
// converter (dynamic range about 2^48) is checked on corner values, on all
// 65,536 values of X with r1 = 2^16 among the first multiples, and on
// 200,000 random X. A watchdog ends a hung run.
module tb_r2b_workloads;

  logic   done3, done4, done16;
  longint ch3, ch4, ch16;
  longint fl3, fl4, fl16;
  longint checks   = 0;
  longint failures = 0;

  r2b_harness #(.K(3),  .EXHAUSTIVE(1'b1)) u_k3  (.done(done3),  .checks(ch3),  .failures(fl3));
  r2b_harness #(.K(4),  .EXHAUSTIVE(1'b1)) u_k4  (.done(done4),  .checks(ch4),  .failures(fl4));
  r2b_harness #(.K(16), .EXHAUSTIVE(1'b0), .N_RANDOM(200000))
                                           u_k16 (.done(done16), .checks(ch16), .failures(fl16));

  initial begin : watchdog
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;  // let the harnesses clear their done flags first
    wait (done3 && done4 && done16);
    checks   = ch3 + ch4 + ch16;
    failures = fl3 + fl4 + fl16;
    $display("k=3: %0d checks, k=4: %0d checks, k=16: %0d checks", ch3, ch4, ch16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
