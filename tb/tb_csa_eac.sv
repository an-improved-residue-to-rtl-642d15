// tb_csa_eac: self-checking test of csa_eac at W = 16.
//
// Corner vectors and random vectors are applied, one per time unit. The sum
// vector must be the bitwise parity of the inputs, the carry vector the
// bitwise majority rotated left by one, and s + cy must be congruent to
// a + b + c modulo 2^W-1. The test also counts vectors whose top carry
// wraps around, and fails if none did. A watchdog ends a hung run.
module tb_csa_eac;

  localparam int unsigned W = 16;
  localparam int unsigned N_RANDOM = 100000;
  localparam longint unsigned M2 = (64'd1 << W) - 1;

  logic [W-1:0] a, b, c, s, cy;
  int checks   = 0;
  int failures = 0;
  int wraps    = 0;

  csa_eac #(.W(W)) dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin : watchdog
    #(N_RANDOM + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, tb, tc);
    logic [W-1:0] maj, exp_cy;
    a = ta; b = tb; c = tc;
    #1;
    maj    = (ta & tb) | (ta & tc) | (tb & tc);
    exp_cy = {maj[W-2:0], maj[W-1]};
    if (maj[W-1]) wraps++;
    checks += 3;
    if (s != (ta ^ tb ^ tc)) begin
      failures++; $display("sum vector wrong: a=%h b=%h c=%h s=%h", ta, tb, tc, s);
    end
    if (cy != exp_cy) begin
      failures++; $display("carry vector wrong: a=%h b=%h c=%h cy=%h", ta, tb, tc, cy);
    end
    if ((longint'(s) + longint'(cy)) % M2 != (longint'(ta) + longint'(tb) + longint'(tc)) % M2) begin
      failures++; $display("modular sum wrong: a=%h b=%h c=%h", ta, tb, tc);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, '0);
    apply('1, '0, '0);
    for (int n = 0; n < N_RANDOM; n++) apply(W'($urandom), W'($urandom), W'($urandom));
    checks++;
    if (wraps == 0) begin failures++; $display("no end-around carry exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
