// rv32i_top: the three RV32I processors of this design, side by side.
//
// sc_* is the single-cycle processor (one instruction per cycle, every
// instruction's work done between two clock edges). p3_* is the 3-stage
// pipelined processor (I, X, M) with ALU bypass, a one-cycle load-use stall
// and predict-not-taken branches. p5_* is the 5-stage pipeline (F, D, E, M,
// W) without hazard detection, which needs programs that keep dependent
// instructions three apart. All three execute the same instruction set with
// the same datapath blocks and are independent: each has its own
// instruction and data memory, its own program load port and its own retire
// record. A shared clock and reset drive them. The three organisations are
// the standard ones for this datapath; putting them side by side in one top,
// with separate memories and load ports, is this design's choice.
module rv32i_top
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter word_t       RESET_PC   = 32'h0000_0000
) (
  input  logic                          clk,
  input  logic                          rst,
  // single-cycle processor
  input  logic                          sc_load_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] sc_load_addr,
  input  word_t                         sc_load_data,
  output retire_t                       sc_retire,
  // 3-stage pipelined processor
  input  logic                          p3_load_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] p3_load_addr,
  input  word_t                         p3_load_data,
  output retire_t                       p3_retire,
  // 5-stage pipelined processor
  input  logic                          p5_load_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] p5_load_addr,
  input  word_t                         p5_load_data,
  output retire_t                       p5_retire
);

  rv32i_single_cycle #(
    .IMEM_WORDS (IMEM_WORDS),
    .DMEM_WORDS (DMEM_WORDS),
    .RESET_PC   (RESET_PC)
  ) u_sc (
    .clk       (clk),
    .rst       (rst),
    .load_we   (sc_load_we),
    .load_addr (sc_load_addr),
    .load_data (sc_load_data),
    .retire    (sc_retire)
  );

  rv32i_pipe3 #(
    .IMEM_WORDS (IMEM_WORDS),
    .DMEM_WORDS (DMEM_WORDS),
    .RESET_PC   (RESET_PC)
  ) u_p3 (
    .clk       (clk),
    .rst       (rst),
    .load_we   (p3_load_we),
    .load_addr (p3_load_addr),
    .load_data (p3_load_data),
    .retire    (p3_retire)
  );

  rv32i_pipe5 #(
    .IMEM_WORDS (IMEM_WORDS),
    .DMEM_WORDS (DMEM_WORDS),
    .RESET_PC   (RESET_PC)
  ) u_p5 (
    .clk       (clk),
    .rst       (rst),
    .load_we   (p5_load_we),
    .load_addr (p5_load_addr),
    .load_data (p5_load_data),
    .retire    (p5_retire)
  );

endmodule
