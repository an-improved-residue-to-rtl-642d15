// r2b_harness: stimulus and checking for one r2b_converter of width K.
//
// Used by tb_r2b_workloads to run several converter sizes side by side.
// With EXHAUSTIVE set, every X in 0 .. M-1 is applied; otherwise the corner
// values 0, 1, 2^K-1, 2^K, M/2, M-2, M-1 and every X that makes r1 = 2^K in
// the first 2^K multiples are applied, followed by N_RANDOM random X. The
// residues are computed with the testbench's own modulo operations and the
// output must equal X. One vector per time unit; `done` rises at the end
// and `checks`/`failures` hold the totals. Valid for K <= 20.
module r2b_harness #(
  parameter int unsigned K          = 4,
  parameter bit          EXHAUSTIVE = 1'b1,
  parameter int unsigned N_RANDOM   = 0
) (
  output logic   done,
  output longint checks,
  output longint failures
);

  localparam longint unsigned M1 = (64'd1 << K) + 1;
  localparam longint unsigned MM2 = 64'd1 << K;
  localparam longint unsigned M3 = (64'd1 << K) - 1;
  localparam longint unsigned M  = M1 * MM2 * M3;

  logic [K:0]     r1;
  logic [K-1:0]   r2;
  logic [K-1:0]   r3;
  logic [3*K-1:0] x;

  r2b_converter #(.K(K)) dut (.r1(r1), .r2(r2), .r3(r3), .x(x));

  task automatic apply(input longint unsigned v);
    r1 = (K+1)'(v % M1);
    r2 = K'(v % MM2);
    r3 = K'(v % M3);
    #1;
    checks++;
    if (longint'(x) != v) begin
      failures++;
      if (failures < 10) $display("K=%0d X=%0d: x=%0d", K, v, x);
    end
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    if (EXHAUSTIVE) begin
      for (longint unsigned v = 0; v < M; v++) apply(v);
    end else begin
      apply(0); apply(1); apply(M3); apply(MM2); apply(M / 2); apply(M - 2); apply(M - 1);
      // X = j * (2^K+1) - 1 has r1 = 2^K.
      for (longint unsigned j = 1; j <= MM2; j++) apply(j * M1 - 1);
      for (int unsigned n = 0; n < N_RANDOM; n++) apply({$urandom, $urandom} % M);
    end
    done = 1'b1;
  end

endmodule
