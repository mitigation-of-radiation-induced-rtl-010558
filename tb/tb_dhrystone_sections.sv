// tb_dhrystone_sections: fault-injection campaign on programs with the
// instruction mix of the eleven Dhrystone sections (8 procedures, 3
// functions).
//
// The compiled benchmark itself is not available, so for each section a
// program body is generated with that section's count of andi, addi, addiu,
// ori, j, beq, bne, R-type ALU and sw instructions, in a fixed pseudo-random
// order (see build_mix_prog). Every body instruction is hit by all 36 fault
// nodes with the golden/dirty bench. The golden runs are checked against the
// reference model; there must be no false detection; the per-section split
// into detected / undetected / benign and the overall share of visible
// errors that the TESM detects are printed, followed by the same split for
// each instruction kind.
module tb_dhrystone_sections;
  import tesm_pkg::*;
  import tb_mips_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  tb_golden_dirty_bench bench (.clk(clk));

  int checks = 0, failures = 0;

  // andi addi addiu ori j beq bne alu sw
  localparam int N_SEC = 11;
  localparam int MIX [N_SEC][9] = '{
    '{0, 0, 14, 0, 0, 1, 0, 5, 32},   // Proc 1
    '{0, 0,  2, 0, 0, 0, 0, 2,  1},   // Proc 2
    '{0, 0,  1, 0, 1, 0, 0, 0,  1},   // Proc 3
    '{0, 0,  0, 0, 0, 0, 0, 2,  1},   // Proc 4
    '{0, 0,  0, 0, 0, 0, 0, 1,  1},   // Proc 5
    '{0, 0,  4, 0, 0, 2, 0, 2,  8},   // Proc 6
    '{0, 0,  1, 0, 0, 0, 0, 1,  1},   // Proc 7
    '{0, 0,  4, 0, 0, 0, 0, 0,  8},   // Proc 8
    '{2, 0,  0, 0, 0, 1, 0, 2,  0},   // Func 1
    '{1, 0,  9, 0, 0, 1, 0, 1,  8},   // Func 2
    '{0, 0,  0, 0, 0, 0, 0, 1,  0}    // Func 3
  };
  localparam string SEC_NAMES [N_SEC] = '{"Proc 1", "Proc 2", "Proc 3", "Proc 4", "Proc 5", "Proc 6",
                                          "Proc 7", "Proc 8", "Func 1", "Func 2", "Func 3"};

  initial begin
    repeat (20_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks + checks, bench.failures + failures + 1);
    $finish;
  end

  initial begin
    int tot_det, tot_undet, tot_ben;
    tot_det = 0; tot_undet = 0; tot_ben = 0;
    bench.init_injector();
    for (int s = 0; s < N_SEC; s++) begin
      prog_t p;
      int bstart, blen, cls, det, undet, ben, fls;
      p = build_mix_prog(MIX[s][0], MIX[s][1], MIX[s][2], MIX[s][3], MIX[s][4], MIX[s][5],
                         MIX[s][6], MIX[s][7], MIX[s][8], 32'(s * 7919 + 17), bstart, blen);
      bench.load_program(p);
      bench.golden_check(p);
      det = 0; undet = 0; ben = 0; fls = 0;
      // straight-line body: dynamic index equals static index
      for (int k = bstart; k < bstart + blen; k++)
        for (int n = 0; n < FI_MASK_W; n++) begin
          bench.run_trial(k, cls);
          case (cls)
            0: ben++;
            1: det++;
            2: undet++;
            default: fls++;
          endcase
        end
      checks++;
      if (fls != 0) begin failures++; $display("FAIL %s: %0d false detections", SEC_NAMES[s], fls); end
      $display("%-7s %2d instr: detected %4d  undetected %4d  benign %4d  detected share of visible errors %0d%%",
               SEC_NAMES[s], blen, det, undet, ben, (det + undet != 0) ? 100 * det / (det + undet) : 0);
      tot_det += det; tot_undet += undet; tot_ben += ben;
    end
    $display("all sections: detected %0d, undetected %0d, benign %0d; TESM detected %0d%% of visible errors",
             tot_det, tot_undet, tot_ben, 100 * tot_det / (tot_det + tot_undet));
    for (int i = 0; i < N_KINDS; i++) begin
      int t, d, u;
      t = bench.kind_trials[i];
      d = bench.kind_det[i];
      u = bench.kind_undet[i];
      if (t != 0)
        $display("  %-10s tests %4d  detected %4d  undetected %4d  coverage of visible errors %0d%%",
                 KIND_NAMES[i], t, d, u, (d + u != 0) ? (100 * d) / (d + u) : 0);
    end
    checks++;
    if (tot_det == 0) begin failures++; $display("FAIL no detection"); end
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks + checks, bench.failures + failures);
    $finish;
  end
endmodule
