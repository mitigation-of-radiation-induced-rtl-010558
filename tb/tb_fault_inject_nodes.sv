// tb_fault_inject_nodes: every single-bit mask and random masks; each opcode
// copy and the funct copy must equal the field XORed with its own slice
// ([35:30] funct, [29:24] fetch opcode, ... [5:0] write-back opcode).
module tb_fault_inject_nodes;
  import tesm_pkg::*;
  opc_t opcode, funct, funct_fi;
  opc_t opc_st [N_STATES];
  logic [FI_MASK_W-1:0] mask;
  int checks = 0, failures = 0;

  fault_inject_nodes dut (.opcode, .funct, .mask, .funct_fi, .opc_st);

  task automatic check();
    #1;
    checks++;
    if (funct_fi !== (funct ^ mask[35:30])) begin failures++; $display("FAIL funct mask=%h", mask); end
    for (int s = 0; s < 5; s++) begin
      logic [5:0] sl = 6'(mask >> (24 - 6 * s));
      checks++;
      if (opc_st[s] !== (opcode ^ sl)) begin failures++; $display("FAIL state %0d mask=%h", s, mask); end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode = 6'b100011; funct = 6'b101010; mask = '0;
    check();
    for (int i = 0; i < FI_MASK_W; i++) begin
      mask = FI_MASK_W'(1) << i;
      check();
    end
    for (int n = 0; n < 1000; n++) begin
      opcode = 6'($urandom); funct = 6'($urandom); mask = {4'($urandom), $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
