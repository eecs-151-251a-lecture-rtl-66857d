// rv32i_pipe5: 5-stage pipelined RV32I processor (F, D, E, M, W).
//
// The single-cycle datapath cut by pipeline registers into five stages,
// each holding one instruction:
//  F  Fetch: pc addresses IMEM.
//  D  Decode: controller, register file read, immediate generation.
//  E  Execute: branch comparator and ALU; the branch or jump target is the
//     ALU result, as in the single-cycle datapath.
//  M  Memory: DMEM read (combinational) or write (on the clock edge ending
//     M). A taken branch or a jump redirects the pc from here.
//  W  Writeback: the write-back mux (mem, alu, pc+4) writes the register
//     file. The destination register index travels down the pipeline with
//     its instruction (D -> E -> M -> W), so the write lands in the register
//     of the instruction that produced the result.
// The pipeline has no hazard detection and no bypass paths. A value written
// in W can be read by an instruction in D in the same cycle (the register
// file read port sees the W write, like a register file written in the first
// half of the cycle), so an instruction may use a result produced three or
// more instructions earlier; closer dependences read stale values and must
// be separated by software. Branches and jumps resolve in M; when the pc is
// redirected, the three younger instructions in F, D and E are squashed, so a
// taken branch or jump costs three extra cycles and there are no delay slots.
// The same-cycle register read, the squash, and the use of the RV32I
// datapath in place of the drawn one are this design's choices.
//
// Interface: clk, synchronous active-high rst (pc <= RESET_PC, pipeline
// emptied, registers cleared), an IMEM load port for placing the program
// while in reset, and a retire record reporting each instruction as it
// leaves W.
module rv32i_pipe5
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

  // pipeline registers, one struct per stage boundary
  typedef struct packed {
    logic  valid;
    word_t pc;
    word_t inst;
  } fd_t;

  typedef struct packed {
    logic  valid;
    word_t pc;
    word_t inst;
    ctrl_t ctrl;
    word_t rs1_val;
    word_t rs2_val;
    word_t imm;
  } de_t;

  typedef struct packed {
    logic  valid;
    word_t pc;
    word_t inst;
    ctrl_t ctrl;
    word_t alu;
    word_t write_data;
    logic  redirect;
  } em_t;

  typedef struct packed {
    logic     valid;
    word_t    pc;
    word_t    inst;
    logic     reg_wen;
    reg_idx_t write_reg;
    wb_sel_e  wb_sel;
    word_t    alu;
    word_t    read_data;
  } mw_t;

  fd_t fd;
  de_t de;
  em_t em;
  mw_t mw;

  word_t f_pc, f_inst;
  logic  m_pc_src;
  word_t m_target;

  // ---------------------------------------------------------------- Fetch
  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk       (clk),
    .load_we   (load_we),
    .load_addr (load_addr),
    .load_data (load_data),
    .addr      (f_pc),
    .inst      (f_inst)
  );

  always_ff @(posedge clk) begin
    if (rst)           f_pc <= RESET_PC;
    else if (m_pc_src) f_pc <= m_target;
    else               f_pc <= f_pc + 32'd4;
  end

  always_ff @(posedge clk) begin
    fd.valid <= !rst && !m_pc_src;
    fd.pc    <= f_pc;
    fd.inst  <= f_inst;
  end

  // --------------------------------------------------------------- Decode
  ctrl_t    d_ctrl;
  word_t    d_rf_a, d_rf_b, d_imm, w_result;
  reg_idx_t d_rs1, d_rs2;
  logic     w_we;

  assign d_rs1 = fd.inst[19:15];
  assign d_rs2 = fd.inst[24:20];

  // the branch outcome is not known yet; the E stage evaluates it
  rv_control u_ctrl (
    .inst  (fd.inst),
    .br_eq (1'b0),
    .br_lt (1'b0),
    .ctrl  (d_ctrl)
  );

  regfile u_rf (
    .clk     (clk),
    .rst     (rst),
    .reg_wen (w_we),
    .addr_d  (mw.write_reg),
    .data_d  (w_result),
    .addr_a  (d_rs1),
    .addr_b  (d_rs2),
    .data_a  (d_rf_a),
    .data_b  (d_rf_b)
  );

  imm_gen u_imm (
    .inst    (fd.inst[31:7]),
    .imm_sel (d_ctrl.imm_sel),
    .imm     (d_imm)
  );

  always_ff @(posedge clk) begin
    de.valid   <= !rst && !m_pc_src && fd.valid;
    de.pc      <= fd.pc;
    de.inst    <= fd.inst;
    de.ctrl    <= d_ctrl;
    // same-cycle write in W is visible to the read in D
    de.rs1_val <= (w_we && mw.write_reg == d_rs1) ? w_result : d_rf_a;
    de.rs2_val <= (w_we && mw.write_reg == d_rs2) ? w_result : d_rf_b;
    de.imm     <= d_imm;
  end

  // -------------------------------------------------------------- Execute
  logic  e_br_eq, e_br_lt;
  word_t e_alu_a, e_alu_b, e_alu;

  branch_comp u_bc (
    .a     (de.rs1_val),
    .b     (de.rs2_val),
    .br_un (de.ctrl.br_un),
    .br_eq (e_br_eq),
    .br_lt (e_br_lt)
  );

  assign e_alu_a = (de.ctrl.a_sel == A_PC)  ? de.pc  : de.rs1_val;
  assign e_alu_b = (de.ctrl.b_sel == B_IMM) ? de.imm : de.rs2_val;

  alu u_alu (
    .a       (e_alu_a),
    .b       (e_alu_b),
    .alu_sel (de.ctrl.alu_sel),
    .result  (e_alu)
  );

  always_ff @(posedge clk) begin
    em.valid      <= !rst && !m_pc_src && de.valid;
    em.pc         <= de.pc;
    em.inst       <= de.inst;
    em.ctrl       <= de.ctrl;
    em.alu        <= e_alu;
    em.write_data <= de.rs2_val;
    em.redirect   <= de.ctrl.is_jump ||
                     (de.ctrl.is_branch && branch_taken(de.inst[14:12], e_br_eq, e_br_lt));
  end

  // --------------------------------------------------------------- Memory
  word_t m_read_data;

  assign m_pc_src = em.valid && em.redirect;
  assign m_target = {em.alu[31:1], 1'b0};

  dmem #(.WORDS(DMEM_WORDS), .SYNC_READ(1'b0)) u_dmem (
    .clk    (clk),
    .addr   (em.alu),
    .data_w (em.write_data),
    .mem_rw ((em.valid && !rst) ? em.ctrl.mem_rw : MEM_READ),
    .funct3 (em.ctrl.mem_funct3),
    .data_r (m_read_data)
  );

  always_ff @(posedge clk) begin
    mw.valid     <= !rst && em.valid;
    mw.pc        <= em.pc;
    mw.inst      <= em.inst;
    mw.reg_wen   <= em.ctrl.reg_wen;
    mw.write_reg <= em.inst[11:7];
    mw.wb_sel    <= em.ctrl.wb_sel;
    mw.alu       <= em.alu;
    mw.read_data <= m_read_data;
  end

  // ------------------------------------------------------------ Writeback
  always_comb begin
    unique case (mw.wb_sel)
      WB_MEM:  w_result = mw.read_data;
      WB_ALU:  w_result = mw.alu;
      WB_PC4:  w_result = mw.pc + 32'd4;
      default: w_result = mw.alu;
    endcase
  end

  assign w_we = mw.valid && mw.reg_wen && mw.write_reg != 5'd0;

  always_comb begin
    retire.valid   = mw.valid;
    retire.pc      = mw.pc;
    retire.inst    = mw.inst;
    retire.rd_we   = w_we;
    retire.rd      = mw.write_reg;
    retire.rd_data = w_result;
  end

endmodule
