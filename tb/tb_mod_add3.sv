// tb_mod_add3: self-checking test of mod_add3.
//
// A W = 4 instance is checked on all 4096 operand triples and a W = 16
// instance on corner and random triples. The result must be congruent to
// a + b + c modulo 2^W-1 (zero may appear as all ones or all zeros). A
// watchdog ends a hung run.
module tb_mod_add3;

  localparam int unsigned W = 16;
  localparam int unsigned N_RANDOM = 100000;
  localparam longint unsigned M2 = (64'd1 << W) - 1;

  logic [W-1:0] a, b, c, sum;
  logic [3:0]   sa, sb, sc, ssum;
  int checks   = 0;
  int failures = 0;

  mod_add3 #(.W(W)) dut       (.a(a),  .b(b),  .c(c),  .sum(sum));
  mod_add3 #(.W(4)) dut_small (.a(sa), .b(sb), .c(sc), .sum(ssum));

  initial begin : watchdog
    #(N_RANDOM + 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, tb, tc);
    a = ta; b = tb; c = tc;
    #1;
    checks++;
    if (longint'(sum) % M2 != (longint'(ta) + longint'(tb) + longint'(tc)) % M2) begin
      failures++;
      if (failures < 10) $display("a=%h b=%h c=%h sum=%h", ta, tb, tc, sum);
    end
  endtask

  initial begin
    a = '0; b = '0; c = '0;
    for (int v = 0; v < 4096; v++) begin
      {sa, sb, sc} = 12'(v);
      #1;
      checks++;
      if (ssum % 15 != (int'(sa) + int'(sb) + int'(sc)) % 15) begin
        failures++;
        if (failures < 10) $display("W=4 a=%0d b=%0d c=%0d sum=%0d", sa, sb, sc, ssum);
      end
    end
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, '0, '0);
    apply(W'(1), '1, '1);
    apply(W'(16'h8000), W'(16'h8000), W'(16'h8000));
    for (int n = 0; n < N_RANDOM; n++) apply(W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
