// tb_detectability_table: checks the time codes of tesm_decoder against the
// predicted detectability of control-flow errors, instruction by instruction.
//
// For each instruction, the predicted transitions are listed: the other
// implemented instructions that one flipped opcode bit turns it into, and,
// for R-type ALU and jr, the change between the two caused by an error in
// the funct field. A transition is detectable by the monitor exactly when
// the two instructions have different completion times. The share of
// detectable transitions, computed from the decoder's codes, must match the
// predicted percentage:
//   lw 100, sw 100, R-type ALU 75, addi 25, addiu 0, andi 33, ori 50,
//   j 100, beq 50, bne 50, jr 75.
// An entry "ALU/JR" (opcode 000000) counts as two transitions: to an ALU
// instruction and to jr. The prediction leaves out ori -> addiu (also one
// bit apart, same time); counting it would make ori 1 of 3. Flips to
// unimplemented opcodes are not counted: whether they are caught depends on
// when the corrupted instruction happens to finish.
module tb_detectability_table;
  import tesm_pkg::*;

  opc_t   opcode, funct;
  tcode_t tcode;
  int checks = 0, failures = 0;

  tesm_decoder dut (.opcode(opcode), .funct(funct), .tcode(tcode));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    opc_t op;
    opc_t fn;
  } ins_t;

  localparam ins_t I_LW   = '{OPC_LW, 6'd0};
  localparam ins_t I_SW   = '{OPC_SW, 6'd0};
  localparam ins_t I_ALU  = '{OPC_RTYPE, FN_ADD};
  localparam ins_t I_JR   = '{OPC_RTYPE, FN_JR};
  localparam ins_t I_ADDI = '{OPC_ADDI, 6'd0};
  localparam ins_t I_ADIU = '{OPC_ADDIU, 6'd0};
  localparam ins_t I_ANDI = '{OPC_ANDI, 6'd0};
  localparam ins_t I_ORI  = '{OPC_ORI, 6'd0};
  localparam ins_t I_J    = '{OPC_J, 6'd0};
  localparam ins_t I_BEQ  = '{OPC_BEQ, 6'd0};
  localparam ins_t I_BNE  = '{OPC_BNE, 6'd0};

  task automatic code_of(ins_t i, output tcode_t c);
    opcode = i.op;
    funct  = i.fn;
    #1;
    c = tcode;
  endtask

  task automatic row(string name, ins_t self, ins_t nb[$], int pct_x100);
    tcode_t c0, c;
    int det = 0;
    code_of(self, c0);
    foreach (nb[k]) begin
      code_of(nb[k], c);
      if (c != c0) det++;
    end
    checks++;
    if ((det * 10000) / nb.size() / 100 != pct_x100 / 100) begin
      failures++;
      $display("FAIL %s: %0d of %0d transitions detectable, predicted %0d.%02d%%",
               name, det, nb.size(), pct_x100 / 100, pct_x100 % 100);
    end else
      $display("%-6s %0d of %0d single-bit transitions change the completion time (%0d%%)",
               name, det, nb.size(), (det * 100) / nb.size());
  endtask

  initial begin
    // sanity: every listed transition is a single-bit change
    checks++;
    if ($countones(OPC_LW ^ OPC_SW) != 1 || $countones(OPC_ADDI ^ OPC_ADDIU) != 1 ||
        $countones(OPC_ANDI ^ OPC_ORI) != 1 || $countones(OPC_BEQ ^ OPC_BNE) != 1 ||
        $countones(OPC_BEQ ^ OPC_ANDI) != 1 || $countones(OPC_BNE ^ OPC_ORI) != 1 ||
        $countones(OPC_RTYPE ^ OPC_J) != 1 || $countones(OPC_RTYPE ^ OPC_BEQ) != 1 ||
        $countones(OPC_RTYPE ^ OPC_ADDI) != 1 || $countones(OPC_ADDI ^ OPC_ANDI) != 1 ||
        $countones(OPC_ADDIU ^ OPC_ORI) != 1)
      failures++;
    row("lw",    I_LW,   '{I_SW}, 10000);
    row("sw",    I_SW,   '{I_LW}, 10000);
    row("alu",   I_ALU,  '{I_J, I_BEQ, I_ADDI, I_JR}, 7500);
    row("addi",  I_ADDI, '{I_ALU, I_JR, I_ANDI, I_ADIU}, 2500);
    row("addiu", I_ADIU, '{I_ORI, I_ADDI}, 0);
    row("andi",  I_ANDI, '{I_ORI, I_ADDI, I_BEQ}, 3333);
    row("ori",   I_ORI,  '{I_ANDI, I_BNE}, 5000);
    row("j",     I_J,    '{I_ALU, I_JR}, 10000);
    row("beq",   I_BEQ,  '{I_ALU, I_JR, I_BNE, I_ANDI}, 5000);
    row("bne",   I_BNE,  '{I_BEQ, I_ORI}, 5000);
    row("jr",    I_JR,   '{I_J, I_BEQ, I_ADDI, I_ALU}, 7500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
