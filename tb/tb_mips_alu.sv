// tb_mips_alu: every ALU operation with directed corner values and random
// operands, compared with results computed in the testbench.
module tb_mips_alu;
  import tesm_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, result;
  logic [4:0]  shamt;
  logic        zero;
  int checks = 0, failures = 0;

  mips_alu dut (.op, .a, .b, .shamt, .result, .zero);

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] y, logic [4:0] s);
    case (o)
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_ADD, ALU_ADDU: return x + y;
      ALU_SUB: return x - y;
      ALU_SLT: return (x < y) ? 32'd1 : 32'd0;
      ALU_SHR: return y >> s;
      ALU_SHL: return y << s;
      default: return x;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops [9] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT, ALU_SHR, ALU_SHL, ALU_JR, ALU_ADDU};
    logic [31:0] corners [5] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff};
    foreach (ops[i]) foreach (corners[j]) foreach (corners[k]) begin
      op = ops[i]; a = corners[j]; b = corners[k]; shamt = 5'(j * 7);
      #1;
      checks += 2;
      if (result !== model(op, a, b, shamt)) begin failures++; $display("FAIL op=%0d a=%h b=%h r=%h", op, a, b, result); end
      if (zero !== (a == b)) failures++;
    end
    for (int n = 0; n < 3000; n++) begin
      op = ops[$urandom % 9]; a = $urandom; b = (n % 5 == 0) ? a : $urandom; shamt = 5'($urandom);
      #1;
      checks += 2;
      if (result !== model(op, a, b, shamt)) begin failures++; $display("FAIL op=%0d a=%h b=%h r=%h", op, a, b, result); end
      if (zero !== (a == b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
