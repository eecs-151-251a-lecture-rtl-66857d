// imm_gen: the immediate generator ("Imm. Gen") of the RV32I datapath.
//
// Takes inst[31:7] and builds the 32-bit immediate imm[31:0] for the format
// chosen by ImmSel. The I, S, B and J layouts follow the RV32I encoding: the
// upper bits are always sign-extended from inst[31]; S and B differ only in
// where inst[7] lands (imm[0] for S, imm[11] for B, with imm[0] = 0); J packs
// imm[20|10:1|11|19:12] so the offset is an even 21-bit value. The U format
// (imm = inst[31:12] << 12, for lui/auipc) completes the base ISA and is this
// design's addition. Purely combinational.
module imm_gen
  import rv_pkg::*;
(
  input  logic [31:7] inst,
  input  imm_sel_e    imm_sel,
  output word_t       imm
);

  always_comb begin
    unique case (imm_sel)
      IMM_I:   imm = {{21{inst[31]}}, inst[30:25], inst[24:21], inst[20]};
      IMM_S:   imm = {{21{inst[31]}}, inst[30:25], inst[11:8], inst[7]};
      IMM_B:   imm = {{20{inst[31]}}, inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_J:   imm = {{12{inst[31]}}, inst[19:12], inst[20], inst[30:25], inst[24:21], 1'b0};
      IMM_U:   imm = {inst[31:12], 12'b0};
      default: imm = '0;
    endcase
  end

endmodule
