// tb_mips_core: the hardened core with a simple word-addressed memory model.
//
// 1. Fault-free run of a program that uses every instruction kind. Each
//    instruction is checked against the instruction-set reference model:
//    start PC, number of cycles from fetch to the last cycle (2/3/4/5), every
//    store (address, data), the commit pulse the cycle after, and the TESM
//    error flag must stay zero. Final data memory must match the model.
// 2. Directed faults whose outcome follows from the instruction timing:
//    a flipped opcode bit in the memory state turns lw into sw (finishes in
//    4 cycles, 5 expected: err_flag = 3^2) and sw into lw (5 instead of 4:
//    err_flag = 2^3); a flipped bit in the fetch-state opcode turns j into an
//    I-type that ends in 3 cycles (err_flag = 0^1); a funct flip that turns
//    add into sll keeps the timing and must NOT be flagged.
module tb_mips_core;
  import tesm_pkg::*;
  import tb_mips_pkg::*;

  localparam int IW = 256, DW = 128;

  logic            clk = 0, rst = 1;
  logic [35:0]     err_mask;
  logic [31:0]     mem_addr, mem_wdata, mem_rdata, pc_out;
  logic            mem_cs, mem_we, iram_sel, error, commit, nstate_out, wd_check;
  tcode_t          err_flag;
  state_e          state_out;
  word_t           imem [IW];
  word_t           dmem [DW];
  int checks = 0, failures = 0;

  mips_core dut (.clk, .rst, .err_mask, .mem_addr, .mem_cs, .mem_we, .iram_sel, .mem_wdata,
                 .mem_rdata, .err_flag, .error, .commit, .nstate_out, .wd_check, .pc_out, .state_out);

  // memory model: asynchronous read, write at the clock edge
  assign mem_rdata = !mem_cs ? '0 : iram_sel ? imem[mem_addr % IW] : dmem[mem_addr % DW];
  always @(posedge clk) if (mem_cs && mem_we && !iram_sel) dmem[mem_addr % DW] <= mem_wdata;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic load_and_reset(prog_t p);
    rst = 1; err_mask = '0;
    foreach (imem[i]) imem[i] = (i < p.size()) ? p[i] : '0;
    foreach (dmem[i]) dmem[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
  endtask

  // fault-free run with per-instruction checks against the reference model
  task automatic run_golden(prog_t p, int n_instr);
    mips_iss iss = new(IW, DW);
    foreach (p[i]) iss.imem[i] = p[i];
    load_and_reset(p);
    for (int k = 0; k < n_instr; k++) begin
      int n, c;
      bit saw_store;
      chk(state_out == ST_FETCH && pc_out == iss.pc, $sformatf("instr %0d starts at pc=%0d, model %0d", k, pc_out, iss.pc));
      n = iss.step();
      saw_store = 0;
      for (c = 1; c <= 6; c++) begin
        #1;
        if (mem_cs && mem_we) begin
          saw_store = 1;
          chk(iss.did_store && mem_addr == iss.st_addr && mem_wdata == iss.st_data,
              $sformatf("store %0d: addr %0d data %h", k, mem_addr, mem_wdata));
        end
        chk(err_flag == 0, $sformatf("false TESM error at instr %0d (%s)", k, iss.kind));
        if (wd_check) break;
        @(posedge clk);
      end
      chk(c == n, $sformatf("instr %0d (%s) took %0d cycles, expected %0d", k, iss.kind, c, n));
      chk(saw_store == iss.did_store, $sformatf("instr %0d store presence", k));
      @(posedge clk); #1;
      chk(commit, "commit after last cycle");
    end
    foreach (dmem[i]) chk(dmem[i] == iss.dmem[i], $sformatf("dmem[%0d]=%h model %h", i, dmem[i], iss.dmem[i]));
  endtask

  // run until instruction index k starts, apply mask for that instruction,
  // return the err_flag seen at its last cycle and the cycle count
  task automatic run_fault(prog_t p, int k, logic [35:0] m, output tcode_t flag, output int cycles);
    int done = 0;
    load_and_reset(p);
    flag = 0; cycles = 0;
    while (done < k) begin
      #1;
      if (wd_check) done++;
      @(posedge clk);
    end
    #1 err_mask = m;   // away from the clock edge
    for (int c = 1; c <= 6; c++) begin
      #1;
      if (wd_check) begin flag = err_flag; cycles = c; break; end
      @(posedge clk);
    end
    @(posedge clk);
    #1 err_mask = '0;
  endtask

  initial begin
    prog_t p = build_char_prog();
    int idx_lw = -1, idx_sw = -1, idx_j = -1, idx_add = -1;
    tcode_t f;
    int cyc;
    err_mask = '0;
    run_golden(p, p.size() - 1);
    foreach (p[i]) begin
      if (idx_lw < 0 && p[i][31:26] == OPC_LW) idx_lw = i;
      if (idx_sw < 0 && p[i][31:26] == OPC_SW) idx_sw = i;
      if (idx_j < 0 && p[i][31:26] == OPC_J) idx_j = i;
      if (idx_add < 0 && p[i][31:26] == OPC_RTYPE && p[i][5:0] == FN_ADD) idx_add = i;
    end
    // instruction index equals program index: no branches before these
    // lw -> sw in the memory state (mask[11:6] bit 3)
    run_fault(p, idx_lw, 36'h1 << (6 + 3), f, cyc);
    chk(cyc == 4 && f == 2'b01, $sformatf("lw->sw: cycles %0d flag %0d", cyc, f));
    // sw -> lw in the memory state
    run_fault(p, idx_sw, 36'h1 << (6 + 3), f, cyc);
    chk(cyc == 5 && f == 2'b01, $sformatf("sw->lw: cycles %0d flag %0d", cyc, f));
    // add -> sll via funct bit 5 (mask[35]): same timing, not flagged
    run_fault(p, idx_add, 36'h1 << 35, f, cyc);
    chk(cyc == 4 && f == 2'b00, $sformatf("add->sll: cycles %0d flag %0d", cyc, f));
    // lw opcode flip in the write-back copy only: still 5 cycles, not flagged
    run_fault(p, idx_lw, 36'h1 << 0, f, cyc);
    chk(cyc == 5 && f == 2'b00, $sformatf("lw wb flip: cycles %0d flag %0d", cyc, f));
    $display("char program: %0d words; j at %0d", p.size(), idx_j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
