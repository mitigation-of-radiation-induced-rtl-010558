// tesm: temporal embedded signature monitor.
//
// The monitor gives every instruction a temporal signature, its expected
// completion time, and checks it when the instruction commits. The decoder
// turns the instruction register's opcode and funct into a time code. That
// code then walks down a chain of registers that shifts every clock, so the
// register holding the current instruction's code is the one whose depth
// equals the number of cycles since decode. When the core commits an
// instruction (check_in high) it also reports, on read_in, the cycle in which
// it finished (cycles minus 2). read_in selects the tap at that depth and the
// tap is XORed with read_in: a non-zero err_flag means the instruction did
// not finish in the time its (fault-free) opcode calls for. This uses both a
// spatial check (the code must be in the right register) and a temporal one
// (it must hold the right time).
//
// Tap 0 is the decoder output itself (used by a 2-cycle jump, which commits
// in its decode cycle); taps 1..N_TAPS-1 are registers. With the 2-bit code
// this is three 2-bit registers, as in the original. err_flag is combinational
// and is zero whenever check_in is low; error is its OR. Resetting the chain
// is this design's choice; the decoder output drives tap 0 regardless.
//
// Timing: instr must be stable from the decode cycle to commit (the core's
// instruction register is loaded at the end of fetch). check_in and read_in
// are sampled in the same cycle as err_flag appears.
module tesm
  import tesm_pkg::*;
#(
  parameter int unsigned N_TAPS = 1 << CODE_W   // decoder tap plus register taps
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [XLEN-1:0]  instr,     // instruction register of the core
  input  tcode_t           read_in,   // cycle of completion, minus 2
  input  logic             check_in,  // instruction commits this cycle
  output tcode_t           err_flag,  // expected XOR actual, zero if no check
  output logic             error      // any bit of err_flag
);

  tcode_t taps [N_TAPS];

  tesm_decoder u_dec (
    .opcode(instr[31:26]),
    .funct (instr[5:0]),
    .tcode (taps[0])
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < N_TAPS; i++) taps[i] <= '0;
    end else begin
      for (int i = 1; i < N_TAPS; i++) taps[i] <= taps[i-1];
    end
  end

  always_comb begin
    err_flag = '0;
    if (check_in && (int'(read_in) < N_TAPS)) err_flag = taps[read_in] ^ read_in;
  end

  assign error = |err_flag;

endmodule
