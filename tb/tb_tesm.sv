// tb_tesm: self-checking testbench of the temporal signature monitor.
// The testbench plays the role of a multi-cycle core: it presents an
// instruction in its decode cycle, then runs for N cycles, raising check_in
// in the last cycle with read_in = (cycle number - 2). For a correct
// completion time err_flag must be zero; for any other completion time it
// must equal expected XOR actual code. check_in low must give zero. Several
// instructions follow each other back to back, so the register chain also
// has to hold the code of the current instruction, not of a stale one.
module tb_tesm;
  import tesm_pkg::*;
  import tb_mips_pkg::*;

  logic        clk = 0, rst = 1;
  logic [31:0] instr;
  tcode_t      read_in;
  logic        check_in;
  tcode_t      err_flag;
  logic        error;
  int checks = 0, failures = 0, cycles = 0;

  tesm dut (.clk, .rst, .instr, .read_in, .check_in, .err_flag, .error);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_cycles(word_t ins);
    case (ins[31:26])
      6'd2: return 2;
      6'd35: return 5;
      6'd4, 6'd5: return 3;
      6'd0: return (ins[5:0] == 6'd8) ? 3 : 4;
      default: return 4;
    endcase
  endfunction

  // run one instruction: fetch cycle, then decode..., finishing in cycle n
  task automatic run_instr(word_t ins, int n);
    int e = exp_cycles(ins);
    // fetch cycle: instruction register still holds the previous word
    check_in = 0; read_in = 0;
    @(posedge clk); #1;
    instr = ins;
    for (int c = 2; c <= n; c++) begin
      read_in  = (c == n) ? tcode_t'(c - 2) : tcode_t'(0);
      check_in = (c == n);
      #1;
      checks++;
      if (c == n) begin
        if (err_flag !== (tcode_t'(e - 2) ^ tcode_t'(n - 2)) || error !== (e != n)) begin
          failures++;
          $display("FAIL ins=%h expected %0d cycles, finished in %0d: err_flag=%0d", ins, e, n, err_flag);
        end
      end else if (err_flag !== 0) begin
        failures++;
        $display("FAIL err_flag=%0d without check", err_flag);
      end
      @(posedge clk); #1;
    end
  endtask

  word_t prog [8];
  initial begin
    instr = 0; read_in = 0; check_in = 0;
    prog[0] = enc_j(5);
    prog[1] = enc_i(OPC_LW, 1, 0, 3);
    prog[2] = enc_i(OPC_SW, 1, 0, 3);
    prog[3] = enc_i(OPC_BEQ, 1, 2, 4);
    prog[4] = enc_i(OPC_BNE, 1, 2, 4);
    prog[5] = enc_r(FN_JR, 0, 3, 0);
    prog[6] = enc_r(FN_ADD, 3, 1, 2);
    prog[7] = enc_i(OPC_ORI, 3, 1, 7);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // correct timing for every instruction, back to back
    for (int i = 0; i < 8; i++) run_instr(prog[i], exp_cycles(prog[i]));
    // every wrong timing for every instruction
    for (int i = 0; i < 8; i++)
      for (int n = 2; n <= 5; n++) run_instr(prog[i], n);
    // random sequences
    for (int k = 0; k < 300; k++) begin
      word_t w;
      int n;
      w = $urandom;
      n = (k % 3 == 0) ? 2 + int'($urandom % 4) : exp_cycles(w);
      run_instr(w, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
