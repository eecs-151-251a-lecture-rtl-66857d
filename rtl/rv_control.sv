// rv_control: the datapath controller of the RV32I processors.
//
// A single case statement on the opcode turns inst[31:0], plus the branch
// comparator's BrEq and BrLT, into the datapath controls PCSel, ImmSel,
// RegWEn, BrUn, ASel, BSel, ALUSel, MemRW and WBSel, and the load/store width
// (funct3), plus is_load / is_branch / is_jump flags for pipeline control.
// Defaults are "write nothing, read memory, fall through to pc+4",
// so an unrecognised instruction behaves as a no-op and is flagged by
// legal = 0.
//
// Settings taken from the datapath walk-throughs: branches use ImmSel = B,
// ASel = pc, BSel = imm, ALUSel = add and pick PCSel from the comparison;
// jalr uses ASel = Reg[rs1], BSel = imm, WBSel = pc+4 and PCSel = alu; jal
// uses ImmSel = J, ASel = pc, BSel = imm, WBSel = pc+4 and PCSel = alu.
// BrUn is funct3[1] (bltu/bgeu). jalr takes the I-type immediate. The other
// opcodes (R-type, I-type arithmetic, loads, stores, lui, auipc) are decoded
// the usual RV32I way. Purely combinational; in the 3-stage pipeline it sits
// in the X stage. Four output bits are plain wires from the instruction:
// BrUn is inst[13] and the memory width field is inst[14:12]. They are
// outputs anyway, so that every datapath control comes from one place.
module rv_control
  import rv_pkg::*;
(
  input  word_t inst,
  input  logic  br_eq,
  input  logic  br_lt,
  output ctrl_t ctrl
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic       funct7_5;
  logic       taken;

  assign opcode   = inst[6:0];
  assign funct3   = inst[14:12];
  assign funct7_5 = inst[30];

  // branch condition from BrEq / BrLT
  assign taken = branch_taken(funct3, br_eq, br_lt);

  // ALU operation of R-type and I-type arithmetic
  function automatic alu_sel_e arith_op(input logic [2:0] f3, input logic alt, input logic is_reg);
    unique case (f3)
      3'b000:  return (is_reg && alt) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl            = '0;
    ctrl.pc_sel     = PC_PLUS4;
    ctrl.imm_sel    = IMM_I;
    ctrl.reg_wen    = 1'b0;
    ctrl.br_un      = funct3[1];
    ctrl.a_sel      = A_REG;
    ctrl.b_sel      = B_IMM;
    ctrl.alu_sel    = ALU_ADD;
    ctrl.mem_rw     = MEM_READ;
    ctrl.mem_funct3 = funct3;
    ctrl.wb_sel     = WB_ALU;
    ctrl.is_load    = 1'b0;
    ctrl.is_branch  = 1'b0;
    ctrl.is_jump    = 1'b0;
    ctrl.legal      = 1'b1;

    case (opcode)
      OP_OP: begin
        ctrl.reg_wen = 1'b1;
        ctrl.b_sel   = B_REG;
        ctrl.alu_sel = arith_op(funct3, funct7_5, 1'b1);
      end
      OP_IMM: begin
        ctrl.reg_wen = 1'b1;
        ctrl.alu_sel = arith_op(funct3, funct7_5, 1'b0);
      end
      OP_LOAD: begin
        ctrl.reg_wen = 1'b1;
        ctrl.wb_sel  = WB_MEM;
        ctrl.is_load = 1'b1;
      end
      OP_STORE: begin
        ctrl.imm_sel = IMM_S;
        ctrl.mem_rw  = MEM_WRITE;
      end
      OP_BRANCH: begin
        ctrl.imm_sel = IMM_B;
        ctrl.a_sel     = A_PC;
        ctrl.is_branch = 1'b1;
        ctrl.pc_sel    = taken ? PC_ALU : PC_PLUS4;
      end
      OP_JALR: begin
        ctrl.reg_wen = 1'b1;
        ctrl.wb_sel  = WB_PC4;
        ctrl.is_jump = 1'b1;
        ctrl.pc_sel  = PC_ALU;
      end
      OP_JAL: begin
        ctrl.imm_sel = IMM_J;
        ctrl.reg_wen = 1'b1;
        ctrl.a_sel   = A_PC;
        ctrl.wb_sel  = WB_PC4;
        ctrl.is_jump = 1'b1;
        ctrl.pc_sel  = PC_ALU;
      end
      OP_LUI: begin
        ctrl.imm_sel = IMM_U;
        ctrl.reg_wen = 1'b1;
        ctrl.alu_sel = ALU_PASSB;
      end
      OP_AUIPC: begin
        ctrl.imm_sel = IMM_U;
        ctrl.reg_wen = 1'b1;
        ctrl.a_sel   = A_PC;
      end
      default: ctrl.legal = 1'b0;
    endcase
  end

endmodule
