// rv_pkg: types and constants shared by the RV32I processors.
//
// Holds the base-ISA opcodes, the encodings of the datapath control signals
// named in the datapath drawings (PCSel, ImmSel, RegWEn, BrUn, ASel, BSel,
// ALUSel, MemRW, WBSel), the control bundle the decoder produces, and the
// retire record both processors report for every finished instruction.
// The select values of the muxes follow the drawings: PCSel 0 = pc+4 and
// 1 = alu, ASel 0 = Reg[rs1] and 1 = pc, BSel 0 = Reg[rs2] and 1 = imm,
// WBSel 0 = mem, 1 = alu, 2 = pc+4. The opcode values are those of the
// RV32I base ISA; the numeric codes of ImmSel and ALUSel are this design's
// own choice.
package rv_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // RV32I major opcodes (inst[6:0])
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_OP     = 7'b0110011;

  // branch funct3
  localparam logic [2:0] F3_BEQ  = 3'b000;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [2:0] F3_BLT  = 3'b100;
  localparam logic [2:0] F3_BGE  = 3'b101;
  localparam logic [2:0] F3_BLTU = 3'b110;
  localparam logic [2:0] F3_BGEU = 3'b111;

  // load / store width funct3
  localparam logic [2:0] F3_B  = 3'b000;
  localparam logic [2:0] F3_H  = 3'b001;
  localparam logic [2:0] F3_W  = 3'b010;
  localparam logic [2:0] F3_BU = 3'b100;
  localparam logic [2:0] F3_HU = 3'b101;

  // The canonical no-op, addi x0, x0, 0
  localparam word_t NOP_INST = 32'h0000_0013;

  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_J = 3'd3,
    IMM_U = 3'd4
  } imm_sel_e;

  typedef enum logic [3:0] {
    ALU_ADD   = 4'd0,
    ALU_SUB   = 4'd1,
    ALU_SLL   = 4'd2,
    ALU_SLT   = 4'd3,
    ALU_SLTU  = 4'd4,
    ALU_XOR   = 4'd5,
    ALU_SRL   = 4'd6,
    ALU_SRA   = 4'd7,
    ALU_OR    = 4'd8,
    ALU_AND   = 4'd9,
    ALU_PASSB = 4'd10
  } alu_sel_e;

  typedef enum logic {
    PC_PLUS4 = 1'b0,
    PC_ALU   = 1'b1
  } pc_sel_e;

  typedef enum logic {
    A_REG = 1'b0,
    A_PC  = 1'b1
  } a_sel_e;

  typedef enum logic {
    B_REG = 1'b0,
    B_IMM = 1'b1
  } b_sel_e;

  typedef enum logic {
    MEM_READ  = 1'b0,
    MEM_WRITE = 1'b1
  } mem_rw_e;

  typedef enum logic [1:0] {
    WB_MEM = 2'd0,
    WB_ALU = 2'd1,
    WB_PC4 = 2'd2
  } wb_sel_e;

  // Everything the controller drives into the datapath.
  typedef struct packed {
    pc_sel_e   pc_sel;
    imm_sel_e  imm_sel;
    logic      reg_wen;
    logic      br_un;
    a_sel_e    a_sel;
    b_sel_e    b_sel;
    alu_sel_e  alu_sel;
    mem_rw_e   mem_rw;
    logic [2:0] mem_funct3;
    wb_sel_e   wb_sel;
    logic      is_load;
    logic      is_branch;
    logic      is_jump;
    logic      legal;
  } ctrl_t;

  // One finished instruction, reported in program order.
  typedef struct packed {
    logic     valid;
    word_t    pc;
    word_t    inst;
    logic     rd_we;
    reg_idx_t rd;
    word_t    rd_data;
  } retire_t;

  // Branch condition of a conditional branch from the comparator outputs:
  // bne and bge/bgeu are the negations of BrEq and BrLT.
  function automatic logic branch_taken(input logic [2:0] funct3, input logic br_eq,
                                        input logic br_lt);
    case (funct3)
      F3_BEQ:          return br_eq;
      F3_BNE:          return !br_eq;
      F3_BLT, F3_BLTU: return br_lt;
      F3_BGE, F3_BGEU: return !br_lt;
      default:         return 1'b0;
    endcase
  endfunction

  // Whether an instruction reads rs1 / rs2 (used for hazard detection).
  function automatic logic reads_rs1(input word_t inst);
    case (inst[6:0])
      OP_JALR, OP_BRANCH, OP_LOAD, OP_STORE, OP_IMM, OP_OP: return 1'b1;
      default:                                              return 1'b0;
    endcase
  endfunction

  function automatic logic reads_rs2(input word_t inst);
    case (inst[6:0])
      OP_BRANCH, OP_STORE, OP_OP: return 1'b1;
      default:                    return 1'b0;
    endcase
  endfunction

endpackage
