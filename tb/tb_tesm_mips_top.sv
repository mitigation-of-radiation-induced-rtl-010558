// tb_tesm_mips_top: end-to-end test of the TESM-hardened MIPS system at its
// default sizes (1024-word instruction and data memories).
//
// 1. Loads a program that uses every instruction kind (all R-type
//    operations, immediates, lw, sw, taken and untaken beq/bne, jr, j) and
//    runs it fault-free on the golden instance: every instruction's cycle
//    count (2/3/4/5) and the final data memory are checked against the
//    reference model, and the TESM must never flag.
// 2. Instruction characterization: every body instruction is hit by all 36
//    fault nodes in turn (golden/dirty comparison, see tb_golden_dirty_bench).
//    No test may be a false detection (flag without any output difference),
//    the fault must be applied in every test and the node must rotate.
// Every mechanism must occur at least once: each completion time, each
// instruction kind, a TESM detection, an undetected error, a benign fault,
// and a wrap of the fault-node rotation.
module tb_tesm_mips_top;
  import tesm_pkg::*;
  import tb_mips_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  tb_golden_dirty_bench bench (.clk(clk));

  int checks = 0, failures = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks + checks, bench.failures + failures + 1);
    $finish;
  end

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    prog_t p = build_char_prog();
    int first, last, cls;
    bench.init_injector();
    bench.load_program(p);
    bench.golden_check(p);
    // body = everything between the 31-instruction prologue and the
    // 31-store epilogue plus final jump
    first = 31;
    last  = bench.tr_kind.size() - 33;
    for (int k = first; k <= last; k++)
      for (int n = 0; n < FI_MASK_W; n++) bench.run_trial(k, cls);
    $display("instruction characterization: %0d tests, detected %0d, undetected %0d, benign %0d, false %0d",
             bench.n_trials, bench.n_detected, bench.n_undetected, bench.n_benign, bench.n_false);
    for (int i = 0; i < N_KINDS; i++) begin
      int t, d, u;
      t = bench.kind_trials[i];
      d = bench.kind_det[i];
      u = bench.kind_undet[i];
      $display("  %-10s tests %4d  detected %4d  undetected %4d  coverage of visible errors %0d%%",
               KIND_NAMES[i], t, d, u, (d + u != 0) ? (100 * d) / (d + u) : 0);
      need(t, {"instruction kind ", KIND_NAMES[i]});
    end
    checks++;
    if (bench.n_false != 0) begin failures++; $display("FAIL %0d false detections", bench.n_false); end
    need(bench.cyc_seen[2], "2-cycle instruction");
    need(bench.cyc_seen[3], "3-cycle instruction");
    need(bench.cyc_seen[4], "4-cycle instruction");
    need(bench.cyc_seen[5], "5-cycle instruction");
    need(bench.n_detected, "TESM detection");
    need(bench.n_undetected, "undetected error");
    need(bench.n_benign, "benign fault");
    need(bench.n_wraps, "fault-node rotation wrap");
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks + checks, bench.failures + failures);
    $finish;
  end
endmodule
