// tesm_decoder: the cycle-time decoder at the front of the temporal embedded
// signature monitor.
//
// It maps the 12 control-flow bits of an instruction (opcode and funct) to a
// 2-bit code of the number of cycles the multi-cycle core needs to complete
// it, counted from fetch: jump 2, beq/bne 3, jump-register 3, load 5, every
// other opcode (R-type ALU, immediates, store and unknown opcodes) 4. The
// code is the cycle count minus 2 (see tesm_pkg). The cycle counts and the
// jump-register special case come from the original description; treating unknown opcodes
// as 4-cycle instructions is the same default as the original decoder.
//
// Purely combinational, no clock.
module tesm_decoder
  import tesm_pkg::*;
(
  input  opc_t   opcode,  // instruction bits 31..26
  input  opc_t   funct,   // instruction bits 5..0
  output tcode_t tcode    // expected completion time, cycles minus 2
);

  always_comb begin
    unique case (opcode)
      OPC_J:          tcode = TC_2CYC;
      OPC_LW:         tcode = TC_5CYC;
      OPC_BEQ,
      OPC_BNE:        tcode = TC_3CYC;
      OPC_RTYPE:      tcode = (funct == FN_JR) ? TC_3CYC : TC_4CYC;
      default:        tcode = TC_4CYC;
    endcase
  end

endmodule
