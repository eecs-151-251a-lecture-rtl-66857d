// tb_rv_control: self-checking testbench of the controller.
//
// For every instruction class checks the control word against the datapath
// settings each class needs: the branch, jalr and jal settings of the
// datapath walk-throughs, R-type and I-type ALU operations, loads, stores,
// lui and auipc. Branches are tried with all four BrEq/BrLT combinations and
// PCSel checked against the branch condition. An unknown opcode must write
// nothing. Then random instructions (random fields under every opcode, and
// random words) are decoded and the whole control word, don't-care fields
// aside, is compared with an expectation built here from the RV32I opcode,
// funct3 and funct7 tables. The branch, jalr and jal settings follow the
// standard datapath walk-throughs; the random part is this testbench's own.
`timescale 1ns/1ps
module tb_rv_control;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  word_t inst;
  logic br_eq, br_lt;
  ctrl_t c;
  int checks = 0, failures = 0;

  rv_control dut (.inst, .br_eq, .br_lt, .ctrl(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (inst %h)", msg, inst); end
  endtask

  // common checks for instructions that write rd from the ALU
  task automatic alu_wb(input alu_sel_e op, input b_sel_e bs, input string nm);
    #1;
    chk(c.reg_wen && c.wb_sel == WB_ALU && c.mem_rw == MEM_READ && c.pc_sel == PC_PLUS4, {nm, " basic"});
    chk(c.alu_sel == op && c.b_sel == bs && c.a_sel == A_REG, {nm, " operation"});
  endtask

  // expected control word; fields a class does not use stay at the defaults
  function automatic ctrl_t expect_ctrl(word_t i, logic eq, logic lt);
    ctrl_t e;
    logic [2:0] f3 = i[14:12];
    alu_sel_e ops[8] = '{ALU_ADD, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_OR, ALU_AND};
    e = '0;
    e.pc_sel = PC_PLUS4; e.mem_rw = MEM_READ; e.wb_sel = WB_ALU; e.a_sel = A_REG; e.b_sel = B_REG;
    e.imm_sel = IMM_I; e.alu_sel = ALU_ADD; e.br_un = f3[1]; e.mem_funct3 = f3; e.legal = 1'b1;
    case (i[6:0])
      7'b0110011: begin
        e.reg_wen = 1; e.alu_sel = ops[f3];
        if (i[30] && f3 == 3'b000) e.alu_sel = ALU_SUB;
        if (i[30] && f3 == 3'b101) e.alu_sel = ALU_SRA;
      end
      7'b0010011: begin
        e.reg_wen = 1; e.b_sel = B_IMM; e.alu_sel = ops[f3];
        if (i[30] && f3 == 3'b101) e.alu_sel = ALU_SRA;
      end
      7'b0000011: begin e.reg_wen = 1; e.b_sel = B_IMM; e.wb_sel = WB_MEM; e.is_load = 1; end
      7'b0100011: begin e.imm_sel = IMM_S; e.b_sel = B_IMM; e.mem_rw = MEM_WRITE; end
      7'b1100011: begin
        logic t;
        e.imm_sel = IMM_B; e.a_sel = A_PC; e.b_sel = B_IMM; e.is_branch = 1;
        t = (f3 == 3'b000) ? eq : (f3 == 3'b001) ? !eq : (f3 == 3'b100 || f3 == 3'b110) ? lt :
            (f3 == 3'b101 || f3 == 3'b111) ? !lt : 1'b0;
        e.pc_sel = t ? PC_ALU : PC_PLUS4;
      end
      7'b1100111: begin e.reg_wen = 1; e.b_sel = B_IMM; e.wb_sel = WB_PC4; e.pc_sel = PC_ALU; e.is_jump = 1; end
      7'b1101111: begin e.reg_wen = 1; e.imm_sel = IMM_J; e.a_sel = A_PC; e.b_sel = B_IMM; e.wb_sel = WB_PC4; e.pc_sel = PC_ALU; e.is_jump = 1; end
      7'b0110111: begin e.reg_wen = 1; e.imm_sel = IMM_U; e.b_sel = B_IMM; e.alu_sel = ALU_PASSB; end
      7'b0010111: begin e.reg_wen = 1; e.imm_sel = IMM_U; e.a_sel = A_PC; e.b_sel = B_IMM; end
      default: e.legal = 0;
    endcase
    return e;
  endfunction

  // compares the fields that matter for this instruction class
  task automatic compare_random(input word_t i);
    ctrl_t e;
    logic [6:0] op = i[6:0];
    e = expect_ctrl(i, br_eq, br_lt);
    chk(c.reg_wen == e.reg_wen && c.mem_rw == e.mem_rw && c.pc_sel == e.pc_sel &&
        c.is_load == e.is_load && c.is_branch == e.is_branch && c.is_jump == e.is_jump && c.legal == e.legal,
        "random: write enables, pc select and flags");
    if (e.reg_wen) chk(c.wb_sel == e.wb_sel, "random: WBSel");
    if (e.legal && op != 7'b0000011 && op != 7'b0100011 && op != 7'b1100011)
      chk(c.alu_sel == e.alu_sel && c.a_sel == e.a_sel && c.b_sel == e.b_sel, "random: ALU controls");
    if (e.legal && (op == 7'b0000011 || op == 7'b0100011 || op == 7'b1100011))
      chk(c.alu_sel == ALU_ADD && c.a_sel == e.a_sel && c.b_sel == B_IMM, "random: address adder");
    if (e.legal && op != 7'b0110011) chk(c.imm_sel == e.imm_sel, "random: ImmSel");
    if (op == 7'b0000011 || op == 7'b0100011) chk(c.mem_funct3 == e.mem_funct3, "random: width");
    if (op == 7'b1100011) chk(c.br_un == e.br_un, "random: BrUn");
  endtask

  initial begin
    br_eq = 0; br_lt = 0;
    // R-type
    inst = ADD(1, 2, 3);  alu_wb(ALU_ADD, B_REG, "add");
    inst = SUB(1, 2, 3);  alu_wb(ALU_SUB, B_REG, "sub");
    inst = enc_r(7'h00, 3, 2, 3'b001, 1, 7'b0110011); alu_wb(ALU_SLL,  B_REG, "sll");
    inst = enc_r(7'h00, 3, 2, 3'b010, 1, 7'b0110011); alu_wb(ALU_SLT,  B_REG, "slt");
    inst = enc_r(7'h00, 3, 2, 3'b011, 1, 7'b0110011); alu_wb(ALU_SLTU, B_REG, "sltu");
    inst = enc_r(7'h00, 3, 2, 3'b100, 1, 7'b0110011); alu_wb(ALU_XOR,  B_REG, "xor");
    inst = enc_r(7'h00, 3, 2, 3'b101, 1, 7'b0110011); alu_wb(ALU_SRL,  B_REG, "srl");
    inst = enc_r(7'h20, 3, 2, 3'b101, 1, 7'b0110011); alu_wb(ALU_SRA,  B_REG, "sra");
    inst = enc_r(7'h00, 3, 2, 3'b110, 1, 7'b0110011); alu_wb(ALU_OR,   B_REG, "or");
    inst = enc_r(7'h00, 3, 2, 3'b111, 1, 7'b0110011); alu_wb(ALU_AND,  B_REG, "and");
    // I-type arithmetic (a negative addi immediate must not turn into sub)
    inst = ADDI(1, 2, -1); alu_wb(ALU_ADD, B_IMM, "addi");
    chk(c.imm_sel == IMM_I, "addi ImmSel");
    inst = enc_i(32'h405, 2, 3'b101, 1, 7'b0010011); alu_wb(ALU_SRA, B_IMM, "srai");
    inst = enc_i(5, 2, 3'b101, 1, 7'b0010011);       alu_wb(ALU_SRL, B_IMM, "srli");
    inst = enc_i(7, 2, 3'b111, 1, 7'b0010011);       alu_wb(ALU_AND, B_IMM, "andi");
    // load
    inst = enc_i(8, 2, 3'b100, 1, 7'b0000011); #1;
    chk(c.reg_wen && c.wb_sel == WB_MEM && c.is_load && c.mem_rw == MEM_READ, "lbu write-back");
    chk(c.imm_sel == IMM_I && c.b_sel == B_IMM && c.alu_sel == ALU_ADD && c.mem_funct3 == 3'b100, "lbu address");
    // store
    inst = enc_s(8, 3, 2, 3'b001); #1;
    chk(!c.reg_wen && c.mem_rw == MEM_WRITE && c.imm_sel == IMM_S && c.b_sel == B_IMM, "sh");
    chk(c.alu_sel == ALU_ADD && c.mem_funct3 == 3'b001 && c.pc_sel == PC_PLUS4 && !c.is_load, "sh address");
    // branches: ImmSel=B, RegWEn=0, ASel=pc, BSel=imm, ALUSel=add, MemRW=read
    for (int f = 0; f < 8; f++) begin
      if (f == 2 || f == 3) continue;
      for (int e = 0; e < 2; e++) for (int l = 0; l < 2; l++) begin
        logic taken;
        inst = enc_b(16, 3, 2, 3'(f)); br_eq = e[0]; br_lt = l[0]; #1;
        case (f)
          0: taken = br_eq;  1: taken = !br_eq;
          4, 6: taken = br_lt;
          default: taken = !br_lt;
        endcase
        chk(c.imm_sel == IMM_B && !c.reg_wen && c.a_sel == A_PC && c.b_sel == B_IMM &&
            c.alu_sel == ALU_ADD && c.mem_rw == MEM_READ, $sformatf("branch f3=%0d settings", f));
        chk(c.br_un == (f >= 6), $sformatf("branch f3=%0d BrUn", f));
        chk((c.pc_sel == PC_ALU) == taken, $sformatf("branch f3=%0d eq=%0d lt=%0d PCSel", f, e, l));
      end
    end
    br_eq = 0; br_lt = 0;
    // jalr: RegWEn=1, ASel=Reg[rs1], BSel=imm (I-type), ALUSel=add, WBSel=pc+4
    inst = JALR(1, 2, -4); #1;
    chk(c.reg_wen && c.a_sel == A_REG && c.b_sel == B_IMM && c.alu_sel == ALU_ADD &&
        c.wb_sel == WB_PC4 && c.pc_sel == PC_ALU && c.imm_sel == IMM_I && c.mem_rw == MEM_READ, "jalr");
    // jal: ImmSel=J, RegWEn=1, ASel=pc, BSel=imm, ALUSel=add, WBSel=pc+4
    inst = JAL(1, 64); #1;
    chk(c.reg_wen && c.a_sel == A_PC && c.b_sel == B_IMM && c.alu_sel == ALU_ADD &&
        c.wb_sel == WB_PC4 && c.pc_sel == PC_ALU && c.imm_sel == IMM_J && c.mem_rw == MEM_READ, "jal");
    inst = LUI(1, 5); #1;
    chk(c.reg_wen && c.imm_sel == IMM_U && c.b_sel == B_IMM && c.alu_sel == ALU_PASSB && c.wb_sel == WB_ALU, "lui");
    inst = AUIPC(1, 5); #1;
    chk(c.reg_wen && c.imm_sel == IMM_U && c.a_sel == A_PC && c.b_sel == B_IMM && c.alu_sel == ALU_ADD && c.wb_sel == WB_ALU, "auipc");
    inst = 32'h0000_007F; #1;
    chk(!c.reg_wen && c.mem_rw == MEM_READ && c.pc_sel == PC_PLUS4 && !c.legal, "illegal opcode");
    // random instructions: valid opcodes with random fields, and random words
    begin
      logic [6:0] opcodes[9] = '{7'b0110011, 7'b0010011, 7'b0000011, 7'b0100011, 7'b1100011,
                                 7'b1100111, 7'b1101111, 7'b0110111, 7'b0010111};
      for (int n = 0; n < 4000; n++) begin
        word_t w = $urandom;
        if (n % 4 != 3) begin
          w[6:0] = opcodes[$urandom_range(0, 8)];
          // keep funct7 to the values RV32I uses, so the expectation is defined
          if (w[6:0] == 7'b0110011 || (w[6:0] == 7'b0010011 && w[14:12] == 3'b101))
            w[31:25] = $urandom_range(0, 1) ? 7'h20 : 7'h00;
          if (w[6:0] == 7'b0110011 && !(w[14:12] == 3'b000 || w[14:12] == 3'b101)) w[31:25] = 7'h00;
          if (w[6:0] == 7'b0000011 && w[14:12] inside {3'b011, 3'b110, 3'b111}) w[14:12] = 3'b010;
          if (w[6:0] == 7'b0100011 && w[14:12] > 3'b010) w[14:12] = 3'b000;
          if (w[6:0] == 7'b1100011 && w[14:12] inside {3'b010, 3'b011}) w[14:12] = 3'b000;
        end
        inst = w; br_eq = $urandom_range(0, 1); br_lt = $urandom_range(0, 1); #1;
        compare_random(w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
