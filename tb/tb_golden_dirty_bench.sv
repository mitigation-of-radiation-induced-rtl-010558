// tb_golden_dirty_bench: golden/dirty fault-injection bench for the
// TESM-hardened MIPS system, shared by the end-to-end and workload tests.
//
// Two instances of tesm_mips_top at their default sizes run the same program
// in lockstep from the same reset. The golden one never injects; the dirty one
// has its fault-mask generator enabled, so each test flips one control-flow
// bit (one of 36 fault nodes, rotating by one per test) during one chosen
// dynamic instruction. Every cycle the bench compares the dirty core's commit
// and memory bus (chip select, write enable, address, write data) with the
// golden core's; any difference means the fault propagated to the outputs.
// Each test is classified:
//   detected    TESM raised its error flag (in the dirty core)
//   undetected  outputs differed and the TESM stayed silent
//   benign      outputs identical, no flag
//   false       flag raised although outputs were identical
// The program's epilogue stores every register, so corrupted registers show
// on the memory bus. Before each test the data memory is cleared through the
// loading port of both instances.
//
// Tasks are called hierarchically by the test module, which owns the clock.
module tb_golden_dirty_bench
  import tesm_pkg::*;
  import tb_mips_pkg::*;
(
  input logic clk
);
  localparam int IW = 1024, DW = 1024;

  logic        rst = 1, fi_rst = 1, load_we = 0, load_imem = 0, fi_new_test = 0;
  logic [31:0] load_addr = 0, load_data = 0;
  logic [15:0] fi_target = 0;

  // golden
  logic [5:0]  g_node, d_node;
  logic        g_active, d_active;
  logic [35:0] g_mask, d_mask;
  tcode_t      g_flag, d_flag;
  logic        g_err, d_err, g_commit, d_commit, g_wdc, d_wdc;
  logic [31:0] g_pc, d_pc, g_addr, d_addr, g_wdata, d_wdata, g_rdata, d_rdata;
  state_e      g_state, d_state;
  logic        g_cs, d_cs, g_we, d_we, g_isel, d_isel;

  tesm_mips_top u_gold (
    .clk, .rst, .fi_rst, .load_we, .load_imem, .load_addr, .load_data,
    .fi_en(1'b0), .fi_new_test, .fi_target, .fi_node_load(1'b0), .fi_node_sel(6'd0),
    .fi_node(g_node), .fi_active(g_active), .fi_mask(g_mask),
    .err_flag(g_flag), .error(g_err), .commit(g_commit), .wd_check(g_wdc), .pc(g_pc), .state(g_state),
    .mem_addr(g_addr), .mem_cs(g_cs), .mem_we(g_we), .iram_sel(g_isel), .mem_wdata(g_wdata), .mem_rdata(g_rdata));

  tesm_mips_top u_dirty (
    .clk, .rst, .fi_rst, .load_we, .load_imem, .load_addr, .load_data,
    .fi_en(1'b1), .fi_new_test, .fi_target, .fi_node_load(1'b0), .fi_node_sel(6'd0),
    .fi_node(d_node), .fi_active(d_active), .fi_mask(d_mask),
    .err_flag(d_flag), .error(d_err), .commit(d_commit), .wd_check(d_wdc), .pc(d_pc), .state(d_state),
    .mem_addr(d_addr), .mem_cs(d_cs), .mem_we(d_we), .iram_sel(d_isel), .mem_wdata(d_wdata), .mem_rdata(d_rdata));

  // results
  int checks = 0, failures = 0;
  int n_trials = 0, n_detected = 0, n_undetected = 0, n_benign = 0, n_false = 0;
  int n_wraps = 0, n_gold_err = 0;
  int kind_trials [N_KINDS];
  int kind_det [N_KINDS];
  int kind_undet [N_KINDS];
  int cyc_seen [6];
  int expected_node = 0;

  initial begin
    foreach (kind_trials[i]) begin kind_trials[i] = 0; kind_det[i] = 0; kind_undet[i] = 0; end
    foreach (cyc_seen[i]) cyc_seen[i] = 0;
  end

  // reference trace of the program
  string tr_kind [$];
  int    tr_cyc [$];
  int    total_cycles;
  mips_iss ref_iss;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic init_injector();
    @(negedge clk) fi_rst = 1;
    @(negedge clk) fi_rst = 0;
    expected_node = 0;
  endtask

  task automatic load_word(bit imem, int a, word_t d);
    @(negedge clk);
    load_we = 1; load_imem = imem; load_addr = a; load_data = d;
    @(negedge clk);
    load_we = 0;
  endtask

  task automatic load_program(prog_t p);
    for (int i = 0; i < IW; i++) begin
      @(negedge clk);
      load_we = 1; load_imem = 1; load_addr = i; load_data = (i < p.size()) ? p[i] : '0;
    end
    @(negedge clk) load_we = 0;
  endtask

  task automatic clear_dmem();
    for (int i = 0; i < DW; i++) begin
      @(negedge clk);
      load_we = 1; load_imem = 0; load_addr = i; load_data = '0;
    end
    @(negedge clk) load_we = 0;
  endtask

  // run the reference model to the final jump-to-self; record the trace
  function automatic void build_reference(prog_t p);
    ref_iss = new(IW, DW);
    foreach (p[i]) ref_iss.imem[i] = p[i];
    tr_kind.delete(); tr_cyc.delete();
    total_cycles = 0;
    for (int n = 0; n < 5000; n++) begin
      word_t pc0 = ref_iss.pc;
      int c = ref_iss.step();
      tr_kind.push_back(ref_iss.kind);
      tr_cyc.push_back(c);
      total_cycles += c;
      if (ref_iss.kind == "j" && ref_iss.pc == pc0) break;
    end
  endfunction

  // fault-free run of the golden core: per-instruction timing and final
  // data memory against the reference model
  task automatic golden_check(prog_t p);
    int k = 0, c = 0;
    build_reference(p);
    clear_dmem();
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    while (k < tr_cyc.size()) begin
      c++;
      chk(!g_err, "golden TESM error");
      if (g_err) n_gold_err++;
      if (g_wdc) begin
        chk(c == tr_cyc[k], $sformatf("golden instr %0d (%s) took %0d cycles, expected %0d", k, tr_kind[k], c, tr_cyc[k]));
        cyc_seen[c]++;
        c = 0;
        k++;
      end
      @(negedge clk);
    end
    for (int i = 0; i < DW; i++)
      chk(u_gold.u_mem.dmem[i] == ref_iss.dmem[i],
          $sformatf("golden dmem[%0d]=%h model %h", i, u_gold.u_mem.dmem[i], ref_iss.dmem[i]));
  endtask

  // one fault-injection test on dynamic instruction k; returns class
  task automatic run_trial(int k, output int cls);
    bit mismatch = 0, flagged = 0, applied = 0;
    int kind = kind_id(tr_kind[k]);
    clear_dmem();
    chk(d_node == 6'(expected_node), $sformatf("fault node %0d, expected %0d", d_node, expected_node));
    @(negedge clk) rst = 1; fi_new_test = 1; fi_target = 16'(k);
    @(negedge clk) rst = 0; fi_new_test = 0;
    for (int c = 0; c < total_cycles + 20; c++) begin
      if (d_active) applied = 1;
      if (d_err) flagged = 1;
      if (g_err) n_gold_err++;
      if (g_commit != d_commit || g_cs != d_cs || g_we != d_we ||
          (g_cs && g_addr != d_addr) || (g_we && g_wdata != d_wdata))
        mismatch = 1;
      @(negedge clk);
    end
    chk(applied, $sformatf("fault on instr %0d never applied", k));
    chk(g_err == 0, "golden flagged");
    n_trials++;
    kind_trials[kind]++;
    if (flagged && mismatch) begin n_detected++; kind_det[kind]++; cls = 1; end
    else if (flagged)        begin n_false++; cls = 3; end
    else if (mismatch)       begin n_undetected++; kind_undet[kind]++; cls = 2; end
    else                     begin n_benign++; cls = 0; end
    expected_node = (expected_node + 1) % FI_MASK_W;
    if (expected_node == 0) n_wraps++;
  endtask

endmodule
