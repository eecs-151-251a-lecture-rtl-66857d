// tb_pipe3_sequences: the four textbook hazard sequences of the 3-stage
// pipeline, run on the processor at its default sizes.
//
// Each case is a short program: a few setup instructions that give the
// source registers known values, three no-ops so that the setup has left the
// pipeline, the sequence itself, and a final jump-to-self. The sequences are
//   data hazard:  add x5,x3,x4 ; add x7,x6,x5          (x5 bypassed to X)
//   load hazard:  lw x5,8(x4)  ; add x7,x6,x5          (one stall cycle, then
//                 the add reads x5 from the register file written by the lw)
//   not taken:    bne x1,x1,L1 ; add x5,x3,x4 ; add x6,x1,x2 ; L1: sub x7,x6,x5
//   taken:        beq x1,x1,L1 ; add x5,x3,x4 ; L1: sub x7,x6,x5
// For every case the testbench checks the retire cycle of each sequence
// instruction relative to the first one (the pipeline diagram's timing: one
// cycle apart without hazards, two after a load-use stall, two across a taken
// branch whose successor is killed), that the killed instruction never
// retires, the values written (worked out by hand below), and that the
// mechanism in question (bypass, stall, kill) fired the expected number of
// times while a sequence instruction was in X, and the others did not.
// Retirements are sampled just after each rising edge.
`timescale 1ns/1ps
module tb_pipe3_sequences;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  localparam int IW = 1024;   // the processor's default sizes
  localparam int DW = 1024;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic load_we = 1'b0;
  logic [$clog2(IW)-1:0] load_addr = '0;
  word_t load_data = '0;
  retire_t retire;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_stall = 0, n_kill = 0;   // totals over all cases
  longint cycle = 0;

  rv32i_pipe3 dut (
    .clk, .rst, .load_we, .load_addr, .load_data, .retire
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Runs setup + 3 nops + seq + jump-to-self. exp_gap[k] is the expected
  // retire cycle of seq[k] relative to seq[0], or -1 if seq[k] must not
  // retire. exp_reg/exp_val give the final register values to check.
  task automatic run_case(input string name, input logic [31:0] setup[$], input logic [31:0] seq[$],
                          input int exp_gap[$], input int exp_reg[$], input word_t exp_val[$],
                          input int exp_fwd, input int exp_stall, input int exp_kill);
    logic [31:0] prog[$];
    int first_seq, fwd = 0, stall = 0, kill = 0;
    longint t0;
    longint t_ret[int];
    bit done = 0;
    prog = setup;
    repeat (3) prog.push_back(NOP_INST);
    first_seq = prog.size();
    foreach (seq[k]) prog.push_back(seq[k]);
    prog.push_back(JAL(0, 0));

    rst = 1'b1;
    foreach (prog[k]) begin
      load_we = 1'b1; load_addr = k[$clog2(IW)-1:0]; load_data = prog[k];
      @(posedge clk); #1;
    end
    load_we = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;

    for (int g = 0; g < 200 && !done; g++) begin
      @(posedge clk); #1;
      // mechanisms are counted while a sequence instruction is in X
      if (dut.x_valid && dut.x_pc >= 32'(4 * first_seq) && dut.x_pc < 32'(4 * (first_seq + seq.size()))) begin
        if (dut.fwd_a || dut.fwd_b) fwd++;
        if (dut.stall) stall++;
        if (dut.kill)  kill++;
      end
      if (retire.valid) begin
        int idx = int'(retire.pc >> 2);
        if (idx >= first_seq && idx < first_seq + seq.size() && !t_ret.exists(idx - first_seq))
          t_ret[idx - first_seq] = cycle;
        if (retire.inst == JAL(0, 0)) done = 1;
      end
    end
    check(done, {name, ": program did not finish"});
    check(t_ret.exists(0), {name, ": first instruction did not retire"});
    t0 = t_ret.exists(0) ? t_ret[0] : 0;
    foreach (exp_gap[k]) begin
      if (exp_gap[k] < 0)
        check(!t_ret.exists(k), $sformatf("%s: instruction %0d retired but should have been killed", name, k));
      else
        check(t_ret.exists(k) && t_ret[k] - t0 == exp_gap[k],
              $sformatf("%s: instruction %0d retired at +%0d, expected +%0d", name, k,
                        t_ret.exists(k) ? t_ret[k] - t0 : -1, exp_gap[k]));
    end
    foreach (exp_reg[k])
      check(dut.u_rf.regs[exp_reg[k]] == exp_val[k],
            $sformatf("%s: x%0d = %0d, expected %0d", name, exp_reg[k],
                      $signed(dut.u_rf.regs[exp_reg[k]]), $signed(exp_val[k])));
    check(fwd == exp_fwd, $sformatf("%s: bypass count %0d, expected %0d", name, fwd, exp_fwd));
    check(stall == exp_stall, $sformatf("%s: stall count %0d, expected %0d", name, stall, exp_stall));
    check(kill == exp_kill, $sformatf("%s: kill count %0d, expected %0d", name, kill, exp_kill));
    n_fwd += fwd; n_stall += stall; n_kill += kill;
  endtask

  initial begin
    // data hazard: x5 = 3 + 4 = 7, x7 = 6 + 7 = 13
    run_case("data hazard",
             '{ADDI(3, 0, 3), ADDI(4, 0, 4), ADDI(6, 0, 6)},
             '{ADD(5, 3, 4), ADD(7, 6, 5)},
             '{0, 1}, '{5, 7}, '{32'd7, 32'd13}, 1, 0, 0);
    // load hazard: mem[0x108] = 77, x5 = 77, x7 = 6 + 77 = 83
    run_case("load hazard",
             '{ADDI(4, 0, 32'h100), ADDI(9, 0, 77), ADDI(6, 0, 6), SW(9, 4, 8)},
             '{LW(5, 4, 8), ADD(7, 6, 5)},
             '{0, 2}, '{5, 7}, '{32'd77, 32'd83}, 0, 1, 0);
    // branch not taken: x5 = 3 + 4 = 7, x6 = 10 + 2 = 12, x7 = 12 - 7 = 5
    run_case("branch not taken",
             '{ADDI(1, 0, 10), ADDI(2, 0, 2), ADDI(3, 0, 3), ADDI(4, 0, 4)},
             '{BNE(1, 1, 12), ADD(5, 3, 4), ADD(6, 1, 2), SUB(7, 6, 5)},
             '{0, 1, 2, 3}, '{5, 6, 7}, '{32'd7, 32'd12, 32'd5}, 1, 0, 0);
    // branch taken: the add is killed, x5 keeps 50, x7 = 6 - 50 = -44
    run_case("branch taken",
             '{ADDI(1, 0, 10), ADDI(3, 0, 3), ADDI(4, 0, 4), ADDI(5, 0, 50), ADDI(6, 0, 6)},
             '{BEQ(1, 1, 8), ADD(5, 3, 4), SUB(7, 6, 5)},
             '{0, -1, 2}, '{5, 7}, '{32'd50, -32'sd44}, 0, 0, 1);
    $display("events: bypass=%0d stall=%0d kill=%0d", n_fwd, n_stall, n_kill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
