// fault_inject_nodes: XOR fault-injection points on the control-flow bits.
//
// A soft error is modelled as a bit flip: each control-flow field is XORed
// with a slice of a fault mask before the control logic sees it. The core
// uses a separate copy of the opcode in each of its five control states, so a
// flip can be placed in exactly one state, and one copy of the funct field
// for the R-type decode. Mask layout (36 bits):
//   [35:30] funct, [29:24] opcode in fetch (it sets the instruction format),
//   [23:18] decode, [17:12] execute, [11:6] memory, [5:0] write-back.
// With an all-zero mask every copy equals the instruction's own field.
// Purely combinational.
module fault_inject_nodes
  import tesm_pkg::*;
(
  input  opc_t                  opcode,
  input  opc_t                  funct,
  input  logic [FI_MASK_W-1:0]  mask,
  output opc_t                  funct_fi,
  output opc_t                  opc_st [N_STATES]  // index = control state
);

  assign funct_fi = funct ^ mask[FI_MASK_W-1 -: OPC_W];

  for (genvar s = 0; s < N_STATES; s++) begin : g_opc
    assign opc_st[s] = opcode ^ mask[(N_STATES-s)*OPC_W-1 -: OPC_W];
  end

endmodule
