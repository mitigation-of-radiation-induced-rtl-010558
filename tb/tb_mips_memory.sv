// tb_mips_memory: fills both arrays through the loading port, then checks
// asynchronous reads of instruction and data memory, bus writes into data
// memory, that a bus write never reaches instruction memory, that rdata is
// zero with cs low, and address wrap-around, against reference arrays.
module tb_mips_memory;
  localparam int IW = 64, DW = 32;
  logic        clk = 0;
  logic [31:0] addr, wdata, rdata, load_addr, load_data;
  logic        cs, we, iram_sel, load_we, load_imem;
  logic [31:0] im [IW];
  logic [31:0] dm [DW];
  int checks = 0, failures = 0;

  mips_memory #(.XLEN(32), .IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (
    .clk, .addr, .cs, .we, .iram_sel, .wdata, .rdata, .load_we, .load_imem, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_read(logic [31:0] exp, string what);
    #1;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s addr=%0d rdata=%h exp=%h", what, addr, rdata, exp);
    end
  endtask

  initial begin
    cs = 0; we = 0; iram_sel = 0; addr = 0; wdata = 0; load_we = 0; load_imem = 0; load_addr = 0; load_data = 0;
    @(negedge clk);
    for (int i = 0; i < IW; i++) begin
      load_we = 1; load_imem = 1; load_addr = i; load_data = $urandom; im[i] = load_data;
      @(negedge clk);
    end
    for (int i = 0; i < DW; i++) begin
      load_we = 1; load_imem = 0; load_addr = i; load_data = $urandom; dm[i] = load_data;
      @(negedge clk);
    end
    load_we = 0;
    // reads
    cs = 1;
    for (int i = 0; i < IW; i++) begin iram_sel = 1; addr = i; expect_read(im[i], "imem"); end
    for (int i = 0; i < DW; i++) begin iram_sel = 0; addr = i; expect_read(dm[i], "dmem"); end
    // wrap-around
    iram_sel = 1; addr = IW + 3; expect_read(im[3], "imem wrap");
    iram_sel = 0; addr = DW + 5; expect_read(dm[5], "dmem wrap");
    // chip select low
    cs = 0; expect_read(0, "cs low");
    // random bus traffic
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      cs = 1'($urandom); we = 1'($urandom); iram_sel = 1'($urandom);
      addr = $urandom % 128; wdata = $urandom;
      if (!cs) expect_read(0, "cs low");
      else if (iram_sel) expect_read(im[addr % IW], "imem");
      else expect_read(dm[addr % DW], "dmem");
      @(posedge clk);
      if (cs && we && !iram_sel) dm[addr % DW] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
