// mips_alu: the ALU of the multi-cycle MIPS core.
//
// Operations: and, or, add, subtract, set-on-less-than, logical shift right
// and left of operand B by shamt, and add-unsigned (addiu). ALU_JR passes
// operand A, the jump-register target, through. Operands are treated as
// unsigned, so set-on-less-than compares unsigned values, as the original
// description of the ALU does (a standard MIPS slt is signed). zero is
// high when A equals B and is used by beq/bne. Purely combinational.
module mips_alu
  import tesm_pkg::*;
(
  input  alu_op_e          op,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  input  logic [4:0]       shamt,
  output logic [XLEN-1:0]  result,
  output logic             zero
);

  always_comb begin
    unique case (op)
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_ADD,
      ALU_ADDU: result = a + b;
      ALU_SUB:  result = a - b;
      ALU_SLT:  result = (a < b) ? XLEN'(1) : '0;
      ALU_SHR:  result = b >> shamt;
      ALU_SHL:  result = b << shamt;
      default:  result = a;        // ALU_JR
    endcase
  end

  assign zero = (a == b);

endmodule
