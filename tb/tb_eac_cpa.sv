// tb_eac_cpa: self-checking test of eac_cpa.
//
// A W = 4 instance is checked exhaustively and a W = 16 instance with corner
// and random vectors. The reference models the adder whose carry-out is
// wired to its carry-in: with t = a + b, the result is 0 when t = 0,
// all ones when t is a non-zero multiple of 2^W-1, and t mod 2^W-1
// otherwise. The test counts sums that needed the end-around carry
// (t >= 2^W) and fails if there were none. A watchdog ends a hung run.
module tb_eac_cpa;

  localparam int unsigned W = 16;
  localparam int unsigned N_RANDOM = 100000;

  logic [W-1:0] a, b, sum;
  logic [3:0]   sa, sb, ssum;
  int checks   = 0;
  int failures = 0;
  int eac_seen = 0;

  eac_cpa #(.W(W)) dut       (.a(a),  .b(b),  .sum(sum));
  eac_cpa #(.W(4)) dut_small (.a(sa), .b(sb), .sum(ssum));

  function automatic longint unsigned ref_sum(longint unsigned ta, tb, int unsigned w);
    longint unsigned m, t;
    m = (64'd1 << w) - 1;
    t = ta + tb;
    if (t == 0) return 0;
    if (t % m == 0) return m;
    return t % m;
  endfunction

  initial begin : watchdog
    #(N_RANDOM + 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, tb);
    longint unsigned exp_s;
    a = ta; b = tb;
    #1;
    exp_s = ref_sum(longint'(ta), longint'(tb), W);
    if (longint'(ta) + longint'(tb) >= (64'd1 << W)) eac_seen++;
    checks++;
    if (longint'(sum) != exp_s) begin
      failures++;
      if (failures < 10) $display("W=%0d a=%h b=%h sum=%h expected %h", W, ta, tb, sum, exp_s);
    end
  endtask

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        sa = 4'(i); sb = 4'(j);
        #1;
        checks++;
        if (longint'(ssum) != ref_sum(longint'(i), longint'(j), 4)) begin
          failures++;
          $display("W=4 a=%0d b=%0d sum=%0d expected %0d", i, j, ssum, ref_sum(longint'(i), longint'(j), 4));
        end
      end
    end

    apply('0, '0);
    apply('1, '0);
    apply('1, '1);
    apply('1, W'(1));
    apply(W'(16'h5555), W'(16'hAAAA));
    apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}});
    apply(W'(16'h8000), W'(16'h7FFF));
    for (int n = 0; n < N_RANDOM; n++) apply(W'($urandom), W'($urandom));

    checks++;
    if (eac_seen == 0) begin failures++; $display("no end-around carry exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
