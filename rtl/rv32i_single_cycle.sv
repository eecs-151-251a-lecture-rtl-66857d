// rv32i_single_cycle: single-cycle RV32I processor.
//
// Every instruction completes in one clock cycle. The pc register addresses
// IMEM; inst[19:15] and inst[24:20] read the register file, inst[31:7] feeds
// the immediate generator, and the controller sets the datapath from
// inst[31:0] and the branch comparator outputs. The ALU takes Reg[rs1] or pc
// (ASel) and Reg[rs2] or imm (BSel). Its result addresses DMEM and is one of
// the three write-back sources (WBSel: mem, alu, pc+4). The next pc is pc+4
// or the ALU result (PCSel), so branch and jump targets are computed by the
// ALU itself. This is the standard teaching datapath for RV32I. Clearing bit 0 of
// a jump target (the RV32I rule for jalr) and U-type support are additions.
//
// Interface: clk, synchronous active-high rst (pc <= RESET_PC, registers
// cleared), an IMEM load port for placing the program while in reset, and a
// retire record that reports each instruction as it finishes: its pc, its
// encoding and the register write it makes at the end of the cycle.
//
// Timing: the critical path runs pc -> IMEM -> register read -> ALU -> DMEM
// -> write-back mux -> register file setup; register file and DMEM writes and
// the pc update all happen on the rising edge that ends the instruction.
module rv32i_single_cycle
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter word_t       RESET_PC   = 32'h0000_0000
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          load_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] load_addr,
  input  word_t                         load_data,
  output retire_t                       retire
);

  word_t pc, pc_plus4, pc_next;
  word_t inst, imm, data_a, data_b, alu_a, alu_b, alu_out, mem_out, wb;
  logic  br_eq, br_lt;
  ctrl_t ctrl;

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

  assign pc_plus4 = pc + 32'd4;
  assign pc_next  = (ctrl.pc_sel == PC_ALU) ? {alu_out[31:1], 1'b0} : pc_plus4;

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk       (clk),
    .load_we   (load_we),
    .load_addr (load_addr),
    .load_data (load_data),
    .addr      (pc),
    .inst      (inst)
  );

  rv_control u_ctrl (
    .inst  (inst),
    .br_eq (br_eq),
    .br_lt (br_lt),
    .ctrl  (ctrl)
  );

  regfile u_rf (
    .clk     (clk),
    .rst     (rst),
    .reg_wen (ctrl.reg_wen && !rst),
    .addr_d  (inst[11:7]),
    .data_d  (wb),
    .addr_a  (inst[19:15]),
    .addr_b  (inst[24:20]),
    .data_a  (data_a),
    .data_b  (data_b)
  );

  imm_gen u_imm (
    .inst    (inst[31:7]),
    .imm_sel (ctrl.imm_sel),
    .imm     (imm)
  );

  branch_comp u_bc (
    .a     (data_a),
    .b     (data_b),
    .br_un (ctrl.br_un),
    .br_eq (br_eq),
    .br_lt (br_lt)
  );

  assign alu_a = (ctrl.a_sel == A_PC)  ? pc  : data_a;
  assign alu_b = (ctrl.b_sel == B_IMM) ? imm : data_b;

  alu u_alu (
    .a       (alu_a),
    .b       (alu_b),
    .alu_sel (ctrl.alu_sel),
    .result  (alu_out)
  );

  dmem #(.WORDS(DMEM_WORDS), .SYNC_READ(1'b0)) u_dmem (
    .clk    (clk),
    .addr   (alu_out),
    .data_w (data_b),
    .mem_rw (rst ? MEM_READ : ctrl.mem_rw),
    .funct3 (ctrl.mem_funct3),
    .data_r (mem_out)
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb = mem_out;
      WB_ALU:  wb = alu_out;
      WB_PC4:  wb = pc_plus4;
      default: wb = alu_out;
    endcase
  end

  always_comb begin
    retire.valid   = !rst;
    retire.pc      = pc;
    retire.inst    = inst;
    retire.rd_we   = ctrl.reg_wen && inst[11:7] != 5'd0;
    retire.rd      = inst[11:7];
    retire.rd_data = wb;
  end

endmodule
