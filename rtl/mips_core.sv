// mips_core: multi-cycle MIPS R2000 subset hardened with a temporal embedded
// signature monitor (TESM) and fitted with fault-injection points.
//
// The core runs one instruction at a time through up to five control states:
//   fetch     read the word at PC into the instruction register, PC <= PC+1
//   decode    read rs/rt, choose the ALU operation; a jump finishes here
//   execute   ALU operation; beq/bne and jr resolve and finish here
//   memory    R-type and immediate results are written back, a store writes
//             memory; both finish here, a load issues its read
//   write-back  the load writes its register and finishes
// So a jump takes 2 cycles, a branch or jr 3, ALU/immediate/store 4 and a
// load 5. Instructions: add sub and or slt sll srl jr, addi addiu andi ori,
// lw sw, beq bne, j. Addresses are word addresses: PC steps by 1, a branch
// adds the sign-extended offset to the already incremented PC and a jump
// loads the 26-bit target field. Immediates are sign-extended for every
// I-type instruction (andi/ori included), and an unknown funct or I-type
// opcode falls back to the jr operation; both follow the original core description.
//
// Control decisions in each state read their own opcode copy from
// fault_inject_nodes, so err_mask can flip any control-flow bit in one chosen
// state. The TESM reads the instruction register directly, i.e. the fault-
// free opcode, while the (possibly corrupted) control reports when the
// instruction actually finished: wd_check marks the last cycle of every
// instruction and read_in is that cycle's number minus 2. A mismatch raises
// err_flag in that same cycle.
//
// Memory bus: one word-addressed bus for instruction and data memory.
// iram_sel selects instruction memory (high in fetch), mem_cs/mem_we strobe
// the access, mem_rdata is read combinationally in the same cycle and writes
// take effect at the clock edge. commit and nstate_out are registered: they
// are high in the cycle after an instruction's last cycle (the next fetch).
// rst is synchronous and active high; it clears PC, state and the commit flag.
module mips_core
  import tesm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic [FI_MASK_W-1:0]  err_mask,   // fault-injection mask, 0 = none
  // memory bus
  output logic [XLEN-1:0]       mem_addr,
  output logic                  mem_cs,
  output logic                  mem_we,
  output logic                  iram_sel,
  output logic [XLEN-1:0]       mem_wdata,
  input  logic [XLEN-1:0]       mem_rdata,
  // status and monitor
  output tcode_t                err_flag,   // TESM mismatch, zero = none
  output logic                  error,      // any bit of err_flag
  output logic                  commit,     // an instruction completed
  output logic                  nstate_out, // same as commit
  output logic                  wd_check,   // last cycle of an instruction
  output logic [XLEN-1:0]       pc_out,     // program counter
  output state_e                state_out   // current control state
);

  // ---------------- architectural and control registers ----------------
  state_e          state, nstate;
  logic [XLEN-1:0] pc, npc, instr;
  alu_op_e         op, op_save;
  logic            reg_or_imm, reg_or_imm_save;
  logic            alu_or_mem, alu_or_mem_save;
  logic [XLEN-1:0] alu_result, alu_result_save;
  logic            reg_w, writing, fetch_sel, cs, we;
  tcode_t          read_in;

  // ---------------- fault-injection nodes ----------------
  opc_t funct_fi;
  opc_t opc_st [N_STATES];

  fault_inject_nodes u_fi (
    .opcode  (instr[31:26]),
    .funct   (instr[5:0]),
    .mask    (err_mask),
    .funct_fi(funct_fi),
    .opc_st  (opc_st)
  );

  // instruction format, decided from the fetch-state opcode copy
  fmt_e fmt;
  always_comb begin
    if (opc_st[ST_FETCH] == OPC_RTYPE)  fmt = FMT_R;
    else if (opc_st[ST_FETCH] == OPC_J) fmt = FMT_J;
    else                                fmt = FMT_I;
  end

  // ---------------- datapath ----------------
  logic [XLEN-1:0] imm_ext, read1, read2, alu_a, alu_b, reg_in;
  logic [4:0]      dr;
  logic            alu_zero;

  assign imm_ext = {{(XLEN-16){instr[15]}}, instr[15:0]};
  assign dr      = (fmt == FMT_R) ? instr[15:11] : instr[20:16];
  assign alu_a   = read1;
  assign alu_b   = reg_or_imm_save ? imm_ext : read2;
  assign reg_in  = alu_or_mem_save ? mem_rdata : alu_result_save;

  mips_regfile #(.XLEN(XLEN), .NREGS(32)) u_rf (
    .clk   (clk),
    .reg_w (reg_w),
    .dr    (dr),
    .sr1   (instr[25:21]),
    .sr2   (instr[20:16]),
    .reg_in(reg_in),
    .read1 (read1),
    .read2 (read2)
  );

  mips_alu u_alu (
    .op    (op_save),
    .a     (alu_a),
    .b     (alu_b),
    .shamt (instr[10:6]),
    .result(alu_result),
    .zero  (alu_zero)
  );

  assign mem_addr  = fetch_sel ? pc : alu_result_save;
  assign iram_sel  = fetch_sel;
  assign mem_cs    = cs;
  assign mem_we    = we;
  assign mem_wdata = writing ? read2 : '0;

  // ---------------- control ----------------
  always_comb begin
    fetch_sel  = 1'b0;
    cs         = 1'b0;
    we         = 1'b0;
    reg_w      = 1'b0;
    writing    = 1'b0;
    npc        = pc;
    op         = ALU_JR;
    reg_or_imm = 1'b0;
    alu_or_mem = 1'b0;
    read_in    = TC_2CYC;
    nstate     = ST_FETCH;
    unique case (state)
      ST_FETCH: begin
        npc       = pc + 1'b1;
        cs        = 1'b1;
        fetch_sel = 1'b1;
        nstate    = ST_DECODE;
      end
      ST_DECODE: begin
        nstate = ST_EXEC;
        if (fmt == FMT_J) begin
          npc    = {{(XLEN-26){1'b0}}, instr[25:0]};
          nstate = ST_FETCH;
        end else if (fmt == FMT_R) begin
          unique case (funct_fi)
            FN_ADD:  op = ALU_ADD;
            FN_SUB:  op = ALU_SUB;
            FN_AND:  op = ALU_AND;
            FN_OR:   op = ALU_OR;
            FN_SLT:  op = ALU_SLT;
            FN_SRL:  op = ALU_SHR;
            FN_SLL:  op = ALU_SHL;
            default: op = ALU_JR;
          endcase
        end else begin
          reg_or_imm = 1'b1;
          unique case (opc_st[ST_DECODE])
            OPC_LW, OPC_SW, OPC_ADDI: op = ALU_ADD;
            OPC_BEQ, OPC_BNE: begin
              op         = ALU_SUB;
              reg_or_imm = 1'b0;
            end
            OPC_ANDI:  op = ALU_AND;
            OPC_ORI:   op = ALU_OR;
            OPC_ADDIU: op = ALU_ADDU;
            default:   op = ALU_JR;
          endcase
          if (opc_st[ST_DECODE] == OPC_LW) alu_or_mem = 1'b1;
        end
      end
      ST_EXEC: begin
        read_in = TC_3CYC;
        nstate  = ST_MEM;
        if ((alu_zero && opc_st[ST_EXEC] == OPC_BEQ) ||
            (!alu_zero && opc_st[ST_EXEC] == OPC_BNE)) begin
          npc    = pc + imm_ext;
          nstate = ST_FETCH;
        end else if (opc_st[ST_EXEC] == OPC_BEQ || opc_st[ST_EXEC] == OPC_BNE) begin
          nstate = ST_FETCH;
        end else if (op_save == ALU_JR) begin
          npc    = alu_a;
          nstate = ST_FETCH;
        end
      end
      ST_MEM: begin
        read_in = TC_4CYC;
        nstate  = ST_FETCH;
        if (fmt == FMT_R || opc_st[ST_MEM] == OPC_ADDI || opc_st[ST_MEM] == OPC_ANDI ||
            opc_st[ST_MEM] == OPC_ORI || opc_st[ST_MEM] == OPC_ADDIU) begin
          reg_w = 1'b1;
        end else if (opc_st[ST_MEM] == OPC_SW) begin
          cs      = 1'b1;
          we      = 1'b1;
          writing = 1'b1;
        end else if (opc_st[ST_MEM] == OPC_LW) begin
          cs     = 1'b1;
          nstate = ST_WB;
        end
      end
      ST_WB: begin
        read_in = TC_5CYC;
        nstate  = ST_FETCH;
        cs      = 1'b1;
        if (opc_st[ST_WB] == OPC_LW) reg_w = 1'b1;
      end
      default: nstate = ST_FETCH;
    endcase
  end

  assign wd_check = (nstate == ST_FETCH);

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= ST_FETCH;
      pc              <= '0;
      commit          <= 1'b0;
      instr           <= '0;
      op_save         <= ALU_AND;
      reg_or_imm_save <= 1'b0;
      alu_or_mem_save <= 1'b0;
      alu_result_save <= '0;
    end else begin
      state  <= nstate;
      pc     <= npc;
      commit <= wd_check;
      if (state == ST_FETCH) instr <= mem_rdata;
      if (state == ST_DECODE) begin
        op_save         <= op;
        reg_or_imm_save <= reg_or_imm;
        alu_or_mem_save <= alu_or_mem;
      end
      if (state == ST_EXEC) alu_result_save <= alu_result;
    end
  end

  assign nstate_out = commit;
  assign pc_out     = pc;
  assign state_out  = state;

  // ---------------- temporal embedded signature monitor ----------------
  tesm u_tesm (
    .clk     (clk),
    .rst     (rst),
    .instr   (instr),
    .read_in (read_in),
    .check_in(wd_check),
    .err_flag(err_flag),
    .error   (error)
  );

  // the control never leaves the five states
  a_state_legal: assert property (@(posedge clk) disable iff (rst) state inside {ST_FETCH, ST_DECODE, ST_EXEC, ST_MEM, ST_WB});
  // every instruction finishes within five cycles
  a_wb_finishes: assert property (@(posedge clk) disable iff (rst) state == ST_WB |-> wd_check);

endmodule
