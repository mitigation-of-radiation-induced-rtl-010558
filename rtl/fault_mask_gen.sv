// fault_mask_gen: fault-injection block that drives the core's fault mask.
//
// One fault-injection node (one bit of the 36-bit mask) is selected at a
// time. A test is started with new_test, which also gives the index of the
// instruction to hit (target, counted from 0 in program order from the start
// of the test). The block counts completed instructions using the core's
// wd_check (high in the last cycle of each instruction). While the count
// equals target the selected mask bit is driven, i.e. for every cycle of that
// one instruction, from its fetch to its last cycle; each control state reads
// only its own slice of the mask, so the flip acts in exactly one place. When
// the hit instruction completes, the node index rotates to the next one
// (wrapping after N_NODES-1), ready for the next test, so a series of tests
// walks through all nodes. With fi_en low the mask is all zero.
//
// Start a test in a cycle where the core is held in reset or is about to
// fetch, so the count lines up with instruction boundaries. node_sel and
// node_load let the node be set directly. The rotation follows the original description;
// the target/count scheme and the node_load port are this design's choice.
// rst is synchronous, active high, and selects node 0.
module fault_mask_gen #(
  parameter int unsigned N_NODES = 36,   // mask width
  parameter int unsigned CNT_W   = 16    // instruction counter width
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       fi_en,
  input  logic                       new_test,   // start a test
  input  logic [CNT_W-1:0]           target,     // instruction to hit
  input  logic                       node_load,  // set node to node_sel
  input  logic [$clog2(N_NODES)-1:0] node_sel,
  input  logic                       wd_check,   // core: last cycle of an instruction
  output logic [N_NODES-1:0]         mask,
  output logic [$clog2(N_NODES)-1:0] node,       // node used by the current/next test
  output logic                       active      // mask is being applied
);

  localparam int unsigned NW = $clog2(N_NODES);

  logic [CNT_W-1:0] count, target_q;
  logic             armed;

  assign active = fi_en && armed && (count == target_q);
  assign mask   = active ? (N_NODES'(1) << node) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      node     <= '0;
      count    <= '0;
      target_q <= '0;
      armed    <= 1'b0;
    end else if (new_test) begin
      count    <= '0;
      target_q <= target;
      armed    <= 1'b1;
      if (node_load) node <= node_sel;
    end else begin
      if (node_load) node <= node_sel;
      if (armed && wd_check) begin
        count <= count + 1'b1;
        if (active) begin
          armed <= 1'b0;
          node  <= (node == NW'(N_NODES - 1)) ? '0 : node + 1'b1;
        end
      end
    end
  end

endmodule
