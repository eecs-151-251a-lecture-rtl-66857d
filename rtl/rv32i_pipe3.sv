// rv32i_pipe3: 3-stage pipelined RV32I processor (I, X, M).
//
// The stages are placed around the three slowest blocks:
//  I  instruction fetch: pc addresses IMEM (combinational read); the
//     instruction and its pc are captured in the I/X register.
//  X  execute: decode, register file read, immediate generation, branch
//     comparison and the ALU; branch and jump targets come out of the ALU
//     and redirect the pc at the end of X. Store data and the address go to
//     DMEM, which is clocked on the edge that starts M.
//  M  memory: the registered DMEM read is available; the write-back mux
//     (mem, alu, pc+4) drives the register file, written at the end of M.
// Hazards, handled by pipe3_hazard:
//  * data: M's write-back value is bypassed into X's operands;
//  * load-use: when the instruction in I reads the rd of a load in X, it
//    is held in I for one cycle and a bubble goes into X; by the time it
//    reaches X the load has left M and written the register file, so it
//    reads the loaded value there (the bypass never carries load data);
//  * control: predict not taken; a taken branch or a jump kills the
//    instruction in I, so it costs one cycle.
// Decoding and reading the register file in X, rather than in I, is this
// design's choice; with it a bypass from M to X is the only one needed.
//
// Interface: clk, synchronous active-high rst (pc <= RESET_PC, pipeline
// emptied, registers cleared), an IMEM load port for placing the program
// while in reset, and a retire record that reports each instruction as it
// leaves M, in program order, with the register write it makes.
module rv32i_pipe3
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

  // ---------------------------------------------------------------- I stage
  word_t i_pc, i_inst, i_pc_next;

  // -------------------------------------------------------- X stage signals
  logic     x_valid;
  word_t    x_pc, x_inst;
  ctrl_t    x_ctrl;
  word_t    x_imm, x_rf_a, x_rf_b, x_rs1_val, x_rs2_val, x_alu_a, x_alu_b, x_alu;
  word_t    x_target;
  logic     x_br_eq, x_br_lt, x_redirect;

  // -------------------------------------------------------- M stage signals
  logic     m_valid;
  word_t    m_pc, m_inst, m_alu, m_mem, m_wb;
  logic     m_reg_wen;
  reg_idx_t m_rd;
  wb_sel_e  m_wb_sel;

  logic fwd_a, fwd_b, stall, kill;

  // ---------------------------------------------------------------- I stage
  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk       (clk),
    .load_we   (load_we),
    .load_addr (load_addr),
    .load_data (load_data),
    .addr      (i_pc),
    .inst      (i_inst)
  );

  always_comb begin
    if (kill)       i_pc_next = x_target;
    else if (stall) i_pc_next = i_pc;
    else            i_pc_next = i_pc + 32'd4;
  end

  always_ff @(posedge clk) begin
    if (rst) i_pc <= RESET_PC;
    else     i_pc <= i_pc_next;
  end

  // I/X pipeline register: a bubble enters X on a stall or a kill
  always_ff @(posedge clk) begin
    if (rst || stall || kill) begin
      x_valid <= 1'b0;
      x_inst  <= NOP_INST;
      x_pc    <= i_pc;
    end else begin
      x_valid <= 1'b1;
      x_inst  <= i_inst;
      x_pc    <= i_pc;
    end
  end

  // ---------------------------------------------------------------- X stage
  rv_control u_ctrl (
    .inst  (x_inst),
    .br_eq (x_br_eq),
    .br_lt (x_br_lt),
    .ctrl  (x_ctrl)
  );

  regfile u_rf (
    .clk     (clk),
    .rst     (rst),
    .reg_wen (m_valid && m_reg_wen),
    .addr_d  (m_rd),
    .data_d  (m_wb),
    .addr_a  (x_inst[19:15]),
    .addr_b  (x_inst[24:20]),
    .data_a  (x_rf_a),
    .data_b  (x_rf_b)
  );

  imm_gen u_imm (
    .inst    (x_inst[31:7]),
    .imm_sel (x_ctrl.imm_sel),
    .imm     (x_imm)
  );

  // bypass mux in front of the comparator, the ALU and the store data
  assign x_rs1_val = fwd_a ? m_wb : x_rf_a;
  assign x_rs2_val = fwd_b ? m_wb : x_rf_b;

  branch_comp u_bc (
    .a     (x_rs1_val),
    .b     (x_rs2_val),
    .br_un (x_ctrl.br_un),
    .br_eq (x_br_eq),
    .br_lt (x_br_lt)
  );

  assign x_alu_a = (x_ctrl.a_sel == A_PC)  ? x_pc  : x_rs1_val;
  assign x_alu_b = (x_ctrl.b_sel == B_IMM) ? x_imm : x_rs2_val;

  alu u_alu (
    .a       (x_alu_a),
    .b       (x_alu_b),
    .alu_sel (x_ctrl.alu_sel),
    .result  (x_alu)
  );

  assign x_redirect = (x_ctrl.pc_sel == PC_ALU);
  assign x_target   = {x_alu[31:1], 1'b0};

  pipe3_hazard u_hz (
    .i_inst     (i_inst),
    .x_valid    (x_valid),
    .x_inst     (x_inst),
    .x_is_load  (x_ctrl.is_load),
    .x_redirect (x_redirect),
    .m_valid    (m_valid),
    .m_reg_wen  (m_reg_wen),
    .m_rd       (m_rd),
    .fwd_a      (fwd_a),
    .fwd_b      (fwd_b),
    .stall      (stall),
    .kill       (kill)
  );

  // DMEM is clocked on the edge that starts M (read and write)
  dmem #(.WORDS(DMEM_WORDS), .SYNC_READ(1'b1)) u_dmem (
    .clk    (clk),
    .addr   (x_alu),
    .data_w (x_rs2_val),
    .mem_rw ((x_valid && !rst) ? x_ctrl.mem_rw : MEM_READ),
    .funct3 (x_ctrl.mem_funct3),
    .data_r (m_mem)
  );

  // X/M pipeline register
  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid   <= 1'b0;
      m_reg_wen <= 1'b0;
    end else begin
      m_valid   <= x_valid;
      m_reg_wen <= x_valid && x_ctrl.reg_wen;
    end
    m_pc     <= x_pc;
    m_inst   <= x_inst;
    m_alu    <= x_alu;
    m_rd     <= x_inst[11:7];
    m_wb_sel <= x_ctrl.wb_sel;
  end

  // ---------------------------------------------------------------- M stage
  always_comb begin
    unique case (m_wb_sel)
      WB_MEM:  m_wb = m_mem;
      WB_ALU:  m_wb = m_alu;
      WB_PC4:  m_wb = m_pc + 32'd4;
      default: m_wb = m_alu;
    endcase
  end

  always_comb begin
    retire.valid   = m_valid;
    retire.pc      = m_pc;
    retire.inst    = m_inst;
    retire.rd_we   = m_reg_wen && m_rd != 5'd0;
    retire.rd      = m_rd;
    retire.rd_data = m_wb;
  end

endmodule
