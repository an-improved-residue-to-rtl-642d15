// tb_r2b_converter: end-to-end, full-size test of r2b_converter.
//
// The converter is built at its default K (8), with no parameter override.
// Every X in 0 .. M-1, M = (2^K+1) 2^K (2^K-1) = 16,776,960, is reduced to
// its residues by the testbench's own modulo operations, the residues are
// applied for one time unit, and the converter output must equal X. This
// covers every valid residue triple exactly once.
//
// The run also counts how often each mechanism of the converter was used,
// and fails if one never was: the r1 = 2^K case that the OR gates of the
// operand logic absorb, the end-around carry of the carry-save row, the
// end-around carry of the carry-propagate adder, and the removal of the
// all-ones zero. A watchdog ends a hung run.
module tb_r2b_converter
  import r2b_pkg::*;
;

  localparam int unsigned K = K_DEFAULT;
  localparam longint unsigned M1 = (64'd1 << K) + 1;
  localparam longint unsigned MM2 = 64'd1 << K;
  localparam longint unsigned M3 = (64'd1 << K) - 1;
  localparam longint unsigned M  = M1 * MM2 * M3;

  logic [K:0]     r1;
  logic [K-1:0]   r2;
  logic [K-1:0]   r3;
  logic [3*K-1:0] x;

  longint checks   = 0;
  longint failures = 0;
  longint n_r1_top = 0;
  longint n_csa_eac = 0;
  longint n_cpa_eac = 0;
  longint n_zero_fix = 0;

  r2b_converter dut (.r1(r1), .r2(r2), .r3(r3), .x(x));

  initial begin : watchdog
    #(M + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (longint unsigned v = 0; v < M; v++) begin
      r1 = (K+1)'(v % M1);
      r2 = K'(v % MM2);
      r3 = K'(v % M3);
      #1;
      if (r1[K])                      n_r1_top++;
      if (dut.u_add.u_csa.co[2*K-1])  n_csa_eac++;
      if (dut.u_add.u_cpa.cin)        n_cpa_eac++;
      if (dut.u_zero.all_ones)        n_zero_fix++;
      checks++;
      if (longint'(x) != v) begin
        failures++;
        if (failures < 10) $display("X=%0d r=(%0d,%0d,%0d): x=%0d", v, r1, r2, r3, x);
      end
    end

    $display("mechanisms: r1=2^K %0d, CSA end-around carry %0d, CPA end-around carry %0d, zero removal %0d",
             n_r1_top, n_csa_eac, n_cpa_eac, n_zero_fix);
    checks += 4;
    if (n_r1_top == 0)   begin failures++; $display("r1 = 2^K never applied"); end
    if (n_csa_eac == 0)  begin failures++; $display("CSA end-around carry never used"); end
    if (n_cpa_eac == 0)  begin failures++; $display("CPA end-around carry never used"); end
    if (n_zero_fix == 0) begin failures++; $display("zero removal never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
