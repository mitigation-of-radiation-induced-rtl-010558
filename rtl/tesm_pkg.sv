// tesm_pkg: constants and types shared by the multi-cycle MIPS core and the
// temporal embedded signature monitor (TESM).
//
// The instruction fields follow the MIPS R2000 layout: opcode in bits 31..26,
// funct in bits 5..0. Those 12 bits are the "control-flow bits" that the
// monitor protects. The opcode values are the standard MIPS ones for the
// eleven instruction kinds the core implements.
//
// A TESM time code is the expected number of cycles an instruction takes,
// minus two: jump = 2 cycles (code 0), branch and jump-register = 3 (code 1),
// ALU, immediate and store = 4 (code 2), load = 5 (code 3). Two bits hold the
// four distinct completion times, as the monitor needs log2 of their count.
//
// The fault mask is 36 bits: six 6-bit slices, one for the funct field and
// one for the opcode copy used in each of the five control states.
package tesm_pkg;

  localparam int unsigned XLEN     = 32;
  localparam int unsigned OPC_W    = 6;
  localparam int unsigned CODE_W   = 2;
  localparam int unsigned N_STATES = 5;
  // one funct slice plus one opcode slice per control state
  localparam int unsigned FI_MASK_W = OPC_W * (N_STATES + 1);

  typedef logic [OPC_W-1:0]  opc_t;
  typedef logic [CODE_W-1:0] tcode_t;

  // opcodes (instruction bits 31..26)
  localparam opc_t OPC_RTYPE = 6'b000000;
  localparam opc_t OPC_J     = 6'b000010;
  localparam opc_t OPC_BEQ   = 6'b000100;
  localparam opc_t OPC_BNE   = 6'b000101;
  localparam opc_t OPC_ADDI  = 6'b001000;
  localparam opc_t OPC_ADDIU = 6'b001001;
  localparam opc_t OPC_ANDI  = 6'b001100;
  localparam opc_t OPC_ORI   = 6'b001101;
  localparam opc_t OPC_LW    = 6'b100011;
  localparam opc_t OPC_SW    = 6'b101011;

  // funct codes of R-type instructions (instruction bits 5..0)
  localparam opc_t FN_SLL = 6'b000000;
  localparam opc_t FN_SRL = 6'b000010;
  localparam opc_t FN_JR  = 6'b001000;
  localparam opc_t FN_ADD = 6'b100000;
  localparam opc_t FN_SUB = 6'b100010;
  localparam opc_t FN_AND = 6'b100100;
  localparam opc_t FN_OR  = 6'b100101;
  localparam opc_t FN_SLT = 6'b101010;

  // TESM time codes: completion cycles minus 2
  localparam tcode_t TC_2CYC = 2'd0;
  localparam tcode_t TC_3CYC = 2'd1;
  localparam tcode_t TC_4CYC = 2'd2;
  localparam tcode_t TC_5CYC = 2'd3;

  typedef enum logic [1:0] {FMT_R, FMT_I, FMT_J} fmt_e;

  typedef enum logic [3:0] {
    ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT, ALU_SHR, ALU_SHL, ALU_JR, ALU_ADDU
  } alu_op_e;

  // control states of the multi-cycle core
  typedef enum logic [2:0] {
    ST_FETCH = 3'd0, ST_DECODE = 3'd1, ST_EXEC = 3'd2, ST_MEM = 3'd3, ST_WB = 3'd4
  } state_e;

endpackage
