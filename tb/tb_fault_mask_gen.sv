// tb_fault_mask_gen: drives wd_check as a core would (instructions of 2..5
// cycles back to back) and checks that the mask is one-hot on the selected
// node exactly during the target instruction, zero otherwise and with fi_en
// low, and that the node rotates by one per test, wrapping after 35.
module tb_fault_mask_gen;
  logic        clk = 0, rst = 1, fi_en, new_test, node_load, wd_check;
  logic [15:0] target;
  logic [5:0]  node_sel, node;
  logic [35:0] mask;
  logic        active;
  int checks = 0, failures = 0;

  fault_mask_gen #(.N_NODES(36), .CNT_W(16)) dut (
    .clk, .rst, .fi_en, .new_test, .target, .node_load, .node_sel, .wd_check, .mask, .node, .active);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run a test: instructions of random length; returns nothing, checks inline
  task automatic run_test(int tgt, int n_instr, bit en, int exp_node);
    int hit_cycles = 0;
    @(negedge clk);
    fi_en = en; new_test = 1; target = 16'(tgt);
    @(negedge clk);
    new_test = 0;
    for (int i = 0; i < n_instr; i++) begin
      int len = 2 + ($urandom % 4);
      for (int c = 1; c <= len; c++) begin
        wd_check = (c == len);
        #1;
        checks++;
        if (en && i == tgt) begin
          hit_cycles++;
          if (mask !== (36'd1 << exp_node)) begin failures++; $display("FAIL mask=%h node %0d", mask, exp_node); end
        end else if (mask !== 0) begin
          failures++; $display("FAIL mask=%h outside target (i=%0d tgt=%0d)", mask, i, tgt);
        end
        @(negedge clk);
      end
    end
    wd_check = 0;
    if (en) begin
      checks++;
      if (hit_cycles < 2) begin failures++; $display("FAIL target never hit"); end
    end
  endtask

  initial begin
    int exp_node = 0;
    fi_en = 0; new_test = 0; target = 0; node_load = 0; node_sel = 0; wd_check = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++;
    if (node !== 0) failures++;
    // disabled: no mask, no rotation
    run_test(2, 5, 0, 0);
    checks++;
    if (node !== 0) begin failures++; $display("FAIL rotated while disabled"); end
    // 80 tests: rotate through all nodes twice, wrap included
    for (int t = 0; t < 80; t++) begin
      run_test($urandom % 6, 8, 1, exp_node);
      exp_node = (exp_node + 1) % 36;
      checks++;
      if (node !== 6'(exp_node)) begin failures++; $display("FAIL node=%0d exp=%0d", node, exp_node); end
    end
    // direct node load
    @(negedge clk); node_load = 1; node_sel = 6'd17;
    @(negedge clk); node_load = 0;
    run_test(1, 3, 1, 17);
    checks++;
    if (node !== 6'd18) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
