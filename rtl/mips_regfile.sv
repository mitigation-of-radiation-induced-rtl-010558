// mips_regfile: 32 x 32-bit register file of the MIPS core.
//
// Two asynchronous read ports (source registers SR1 = rs, SR2 = rt) and one
// write port (destination register DR) written on the rising clock edge when
// reg_w is high. Register 0 always reads as zero, as in the MIPS
// architecture; this and the reset-free storage are this design's choices,
// the original description only names the block and its ports.
module mips_regfile #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     reg_w,
  input  logic [$clog2(NREGS)-1:0] dr,
  input  logic [$clog2(NREGS)-1:0] sr1,
  input  logic [$clog2(NREGS)-1:0] sr2,
  input  logic [XLEN-1:0]          reg_in,
  output logic [XLEN-1:0]          read1,
  output logic [XLEN-1:0]          read2
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (reg_w && dr != '0) regs[dr] <= reg_in;
  end

  assign read1 = (sr1 == '0) ? '0 : regs[sr1];
  assign read2 = (sr2 == '0) ? '0 : regs[sr2];

endmodule
