// pipe3_hazard: hazard control of the 3-stage (I, X, M) RV32I pipeline.
//
// Three decisions, all combinational, for the instructions currently in the
// I, X and M stages:
//  * Bypass (fwd_a / fwd_b): the instruction in M writes the register file
//    only at the end of M, so an instruction in X that reads the same
//    register takes M's write-back value instead of the stale register file
//    output. This is the "forward the ALU result back to the ALU input" fix.
//    A load never needs it: its dependent instruction is held back (below)
//    until the load has written the register file.
//  * Load stall (stall): a load in X has no data until M. If the instruction
//    in I reads the load's rd, it is held in I for one cycle (pc held) and a
//    bubble enters X. Independent instructions are not delayed.
//  * Kill (kill): branches and jumps are resolved in X with "predict not
//    taken". When X redirects the pc, the instruction fetched behind it in I
//    is squashed (a bubble enters X) and fetch restarts at the target.
// Register x0 never causes a bypass or a stall. Which operands an
// instruction reads is decided from its opcode (rv_pkg::reads_rs1/2).
// The three mechanisms and their one-cycle costs are the classic 3-stage
// scheme; the exact comparison terms, the per-operand use test and treating
// jumps like taken branches are this design's choices.
module pipe3_hazard
  import rv_pkg::*;
(
  // instruction in I (just fetched)
  input  word_t    i_inst,
  // instruction in X
  input  logic     x_valid,
  input  word_t    x_inst,
  input  logic     x_is_load,
  input  logic     x_redirect,
  // instruction in M
  input  logic     m_valid,
  input  logic     m_reg_wen,
  input  reg_idx_t m_rd,
  // decisions
  output logic     fwd_a,
  output logic     fwd_b,
  output logic     stall,
  output logic     kill
);

  reg_idx_t x_rs1, x_rs2, x_rd, i_rs1, i_rs2;
  logic     m_writes;

  assign x_rs1 = x_inst[19:15];
  assign x_rs2 = x_inst[24:20];
  assign x_rd  = x_inst[11:7];
  assign i_rs1 = i_inst[19:15];
  assign i_rs2 = i_inst[24:20];

  assign m_writes = m_valid && m_reg_wen && (m_rd != 5'd0);

  assign fwd_a = x_valid && m_writes && reads_rs1(x_inst) && (x_rs1 == m_rd);
  assign fwd_b = x_valid && m_writes && reads_rs2(x_inst) && (x_rs2 == m_rd);

  assign stall = x_valid && x_is_load && (x_rd != 5'd0) &&
                 ((reads_rs1(i_inst) && i_rs1 == x_rd) ||
                  (reads_rs2(i_inst) && i_rs2 == x_rd));

  assign kill  = x_valid && x_redirect;

endmodule
