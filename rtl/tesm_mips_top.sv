// tesm_mips_top: MIPS system hardened with the temporal embedded signature
// monitor, prepared for fault-injection experiments.
//
// It joins the multi-cycle core (with its TESM and fault-injection nodes),
// the instruction/data memory and the fault-mask generator. With fi_en low
// the system is the plain hardened processor; a second instance with fi_en
// low serves as the fault-free reference in a golden/dirty comparison.
//
// Ports: clk, rst (synchronous, active high; resets core), fi_rst (resets
// only the fault-mask generator, so its node rotation survives core resets),
// the memory loading port, the fault-injection controls, and observation of
// the memory bus, commit and the TESM error flag for a test logger.
// Timing: err_flag is valid in an instruction's last cycle (wd_check);
// commit is high the cycle after.
module tesm_mips_top
  import tesm_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          fi_rst,
  // loading port
  input  logic                          load_we,
  input  logic                          load_imem,
  input  logic [XLEN-1:0]               load_addr,
  input  logic [XLEN-1:0]               load_data,
  // fault injection control
  input  logic                          fi_en,
  input  logic                          fi_new_test,
  input  logic [15:0]                   fi_target,
  input  logic                          fi_node_load,
  input  logic [$clog2(FI_MASK_W)-1:0]  fi_node_sel,
  output logic [$clog2(FI_MASK_W)-1:0]  fi_node,
  output logic                          fi_active,
  output logic [FI_MASK_W-1:0]          fi_mask,
  // observation
  output tcode_t                        err_flag,
  output logic                          error,
  output logic                          commit,
  output logic                          wd_check,
  output logic [XLEN-1:0]               pc,
  output state_e                        state,
  output logic [XLEN-1:0]               mem_addr,
  output logic                          mem_cs,
  output logic                          mem_we,
  output logic                          iram_sel,
  output logic [XLEN-1:0]               mem_wdata,
  output logic [XLEN-1:0]               mem_rdata
);

  logic nstate_out;

  fault_mask_gen #(.N_NODES(FI_MASK_W), .CNT_W(16)) u_fi (
    .clk      (clk),
    .rst      (fi_rst),
    .fi_en    (fi_en),
    .new_test (fi_new_test),
    .target   (fi_target),
    .node_load(fi_node_load),
    .node_sel (fi_node_sel),
    .wd_check (wd_check),
    .mask     (fi_mask),
    .node     (fi_node),
    .active   (fi_active)
  );

  mips_core u_core (
    .clk       (clk),
    .rst       (rst),
    .err_mask  (fi_mask),
    .mem_addr  (mem_addr),
    .mem_cs    (mem_cs),
    .mem_we    (mem_we),
    .iram_sel  (iram_sel),
    .mem_wdata (mem_wdata),
    .mem_rdata (mem_rdata),
    .err_flag  (err_flag),
    .error     (error),
    .commit    (commit),
    .nstate_out(nstate_out),
    .wd_check  (wd_check),
    .pc_out    (pc),
    .state_out (state)
  );

  mips_memory #(.XLEN(XLEN), .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_mem (
    .clk      (clk),
    .addr     (mem_addr),
    .cs       (mem_cs),
    .we       (mem_we),
    .iram_sel (iram_sel),
    .wdata    (mem_wdata),
    .rdata    (mem_rdata),
    .load_we  (load_we),
    .load_imem(load_imem),
    .load_addr(load_addr),
    .load_data(load_data)
  );

  // commit and nstate_out are the same registered flag
  a_commit_eq: assert property (@(posedge clk) commit == nstate_out);

endmodule
