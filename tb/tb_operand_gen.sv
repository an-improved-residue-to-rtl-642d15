// tb_operand_gen: self-checking test of operand_gen.
//
// For K = 8 every valid (r1, r2) pair and every r3 is applied. The check is
// arithmetic, not bitwise: (op_c + op_b) mod 2^(2K)-1 must equal
// ((2^(2K-1) + 2^(K-1) - 1) r1 - 2^K r2) mod 2^(2K)-1, and op_a must equal
// (2^(2K-1) + 2^(K-1)) r3 mod 2^(2K)-1. A second instance with K = 3 is
// checked against the worked example r1 = r2 = 3, which gives op_c = 14,
// op_b = 4 and a sum of 18. Each vector is held for one time unit; a
// watchdog ends the run if it does not finish.
module tb_operand_gen;

  localparam int unsigned K  = 8;
  localparam longint unsigned M2 = (64'd1 << (2 * K)) - 1;

  logic [K:0]     r1;
  logic [K-1:0]   r2;
  logic [K-1:0]   r3;
  logic [2*K-1:0] op_c, op_b, op_a;

  logic [3:0] e_r1;
  logic [2:0] e_r2, e_r3;
  logic [5:0] e_c, e_b, e_a;

  int checks   = 0;
  int failures = 0;

  operand_gen #(.K(K)) dut (
    .r1(r1), .r2(r2), .r3(r3), .op_c(op_c), .op_b(op_b), .op_a(op_a)
  );

  operand_gen #(.K(3)) dut_ex (
    .r1(e_r1), .r2(e_r2), .r3(e_r3), .op_c(e_c), .op_b(e_b), .op_a(e_a)
  );

  function automatic longint unsigned mmod(longint unsigned v);
    return v % M2;
  endfunction

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned coef_c, coef_a, exp_cb, exp_a, got;
    coef_c = (64'd1 << (2 * K - 1)) + (64'd1 << (K - 1)) - 1;
    coef_a = (64'd1 << (2 * K - 1)) + (64'd1 << (K - 1));
    r3 = '0;

    // Worked example, k = 3.
    e_r1 = 4'd3; e_r2 = 3'd3; e_r3 = 3'd0;
    #1;
    checks += 3;
    if (e_c != 6'd14) begin failures++; $display("example: op_c=%0d, expected 14", e_c); end
    if (e_b != 6'd4)  begin failures++; $display("example: op_b=%0d, expected 4", e_b); end
    if ((e_c + e_b) % 63 != 18) begin failures++; $display("example: sum wrong"); end

    for (int i1 = 0; i1 <= (1 << K); i1++) begin
      for (int i2 = 0; i2 < (1 << K); i2++) begin
        r1 = (K+1)'(i1);
        r2 = K'(i2);
        #1;
        exp_cb = mmod(mmod(coef_c * longint'(i1)) + M2 - mmod((64'd1 << K) * longint'(i2)));
        got    = mmod(longint'(op_c) + longint'(op_b));
        checks++;
        if (got != exp_cb) begin
          failures++;
          if (failures < 10) $display("r1=%0d r2=%0d: op_c+op_b=%0d, expected %0d", i1, i2, got, exp_cb);
        end
      end
    end

    for (int i3 = 0; i3 < (1 << K) - 1; i3++) begin
      r3 = K'(i3);
      #1;
      exp_a = mmod(coef_a * longint'(i3));
      checks++;
      if (longint'(op_a) != exp_a) begin
        failures++;
        if (failures < 10) $display("r3=%0d: op_a=%0d, expected %0d", i3, op_a, exp_a);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
