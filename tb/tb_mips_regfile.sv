// tb_mips_regfile: random writes and reads of the register file against a
// reference array; register 0 must always read as zero.
module tb_mips_regfile;
  logic        clk = 0, reg_w;
  logic [4:0]  dr, sr1, sr2;
  logic [31:0] reg_in, read1, read2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  mips_regfile dut (.clk, .reg_w, .dr, .sr1, .sr2, .reg_in, .read1, .read2);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reg_w = 1; reg_in = 0; sr1 = 0; sr2 = 0;
    // initialise every register
    for (int r = 0; r < 32; r++) begin
      dr = 5'(r); reg_in = $urandom;
      model[r] = (r == 0) ? 0 : reg_in;
      @(posedge clk); #1;
    end
    for (int k = 0; k < 2000; k++) begin
      reg_w = 1'($urandom); dr = 5'($urandom); reg_in = $urandom;
      sr1 = 5'($urandom); sr2 = 5'($urandom);
      #1;
      checks += 2;
      if (read1 !== model[sr1]) begin failures++; $display("FAIL read1 r%0d", sr1); end
      if (read2 !== model[sr2]) begin failures++; $display("FAIL read2 r%0d", sr2); end
      @(posedge clk);
      if (reg_w && dr != 0) model[dr] = reg_in;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
