// tb_tesm_decoder: exhaustive check of the TESM cycle-time decoder.
// All 4096 opcode/funct combinations are applied; the expected completion
// time is worked out from the instruction timing rules (jump 2 cycles,
// branch 3, jump-register 3, load 5, everything else 4) and compared with
// the 2-bit code, which must equal cycles minus 2.
module tb_tesm_decoder;
  import tesm_pkg::*;

  opc_t   opcode, funct;
  tcode_t tcode;
  int checks = 0, failures = 0;

  tesm_decoder dut (.opcode(opcode), .funct(funct), .tcode(tcode));

  function automatic int expected_cycles(int op, int fn);
    if (op == 2) return 2;                 // j
    if (op == 35) return 5;                // lw
    if (op == 4 || op == 5) return 3;      // beq, bne
    if (op == 0 && fn == 8) return 3;      // jr
    return 4;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 64; op++) begin
      for (int fn = 0; fn < 64; fn++) begin
        opcode = 6'(op);
        funct  = 6'(fn);
        #1;
        checks++;
        if (int'(tcode) + 2 != expected_cycles(op, fn)) begin
          failures++;
          if (failures < 10) $display("FAIL op=%0d fn=%0d code=%0d", op, fn, tcode);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
