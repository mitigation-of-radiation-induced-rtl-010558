// mips_memory: instruction and data memory of the MIPS core on one bus.
//
// Two word-addressed arrays: instruction memory (IMEM_WORDS) and data memory
// (DMEM_WORDS). iram_sel picks the instruction memory, otherwise the data
// memory; addresses wrap modulo the array size. Reads are asynchronous, so
// rdata is valid in the same cycle as addr, which the core relies on (it
// latches its fetch and load data at the end of the access cycle). A write
// (cs and we with iram_sel low) lands in data memory at the rising edge.
// rdata is zero when cs is low.
//
// A separate loading port (load_we, load_imem, load_addr, load_data) fills
// either array before or between runs, the way a benchmark image is loaded
// before execution; it has priority over a bus write to the same word.
// Both arrays are uninitialised at power-up. Sizes are this design's choice.
module mips_memory #(
  parameter int unsigned XLEN       = 32,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic            clk,
  // processor bus
  input  logic [XLEN-1:0] addr,
  input  logic            cs,
  input  logic            we,
  input  logic            iram_sel,
  input  logic [XLEN-1:0] wdata,
  output logic [XLEN-1:0] rdata,
  // loading port
  input  logic            load_we,
  input  logic            load_imem,   // 1 = instruction memory, 0 = data memory
  input  logic [XLEN-1:0] load_addr,
  input  logic [XLEN-1:0] load_data
);

  localparam int unsigned IA_W = $clog2(IMEM_WORDS);
  localparam int unsigned DA_W = $clog2(DMEM_WORDS);

  logic [XLEN-1:0] imem [IMEM_WORDS];
  logic [XLEN-1:0] dmem [DMEM_WORDS];

  logic [IA_W-1:0] ia, lia;
  logic [DA_W-1:0] da, lda;
  assign ia  = addr[IA_W-1:0];
  assign da  = addr[DA_W-1:0];
  assign lia = load_addr[IA_W-1:0];
  assign lda = load_addr[DA_W-1:0];

  always_ff @(posedge clk) begin
    if (load_we && load_imem) imem[lia] <= load_data;
  end

  always_ff @(posedge clk) begin
    if (load_we && !load_imem)          dmem[lda] <= load_data;
    else if (cs && we && !iram_sel)     dmem[da]  <= wdata;
  end

  always_comb begin
    if (!cs)           rdata = '0;
    else if (iram_sel) rdata = imem[ia];
    else               rdata = dmem[da];
  end

endmodule
