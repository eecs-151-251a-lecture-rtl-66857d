// tb_rv32i_pipe3: self-checking testbench of the 3-stage RV32I pipeline.
//
// Runs a directed program built from the classic hazard cases (ALU result
// used by the next instruction, load followed by a dependent and by an
// independent instruction, a branch not taken, a branch taken, jal and jalr)
// and then a set of random programs. Every instruction the pipeline retires is
// compared with the reference model: pc, encoding, destination and written
// value. The cycle distance between retirements is checked against the
// pipeline's timing rules (one extra cycle after a taken branch or a jump,
// one extra cycle for a load-use dependence, none otherwise). At the end of
// each program the register file and data memory are compared. Bypasses,
// stalls and kills are counted, and each must have happened. The timing
// rules are the classic 3-stage ones; the programs are this testbench's own.
`timescale 1ns/1ps
module tb_rv32i_pipe3;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  localparam int IW = 1024;
  localparam int DW = 1024;
  localparam int N_RANDOM = 20;
  localparam int PROG_LEN = 300;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic load_we = 1'b0;
  logic [$clog2(IW)-1:0] load_addr = '0;
  word_t load_data = '0;
  retire_t retire;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_stall = 0, n_kill = 0, n_retired = 0;
  longint cycle = 0;

  rv32i_pipe3 #(.IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (
    .clk, .rst, .load_we, .load_addr, .load_data, .retire
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (dut.fwd_a || dut.fwd_b) n_fwd++;
    if (dut.stall) n_stall++;
    if (dut.kill)  n_kill++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_program(input logic [31:0] prog[$], input string name);
    rv_ref_model rm = new(IW, DW);
    ref_step_t s, prev;
    longint last_cycle;
    bit first = 1, done = 0;
    int guard = 0;
    rst = 1'b1;
    foreach (prog[k]) begin
      rm.imem[k] = prog[k];
      load_we = 1'b1; load_addr = k[$clog2(IW)-1:0]; load_data = prog[k];
      @(posedge clk); #1;
    end
    load_we = 1'b0;
    @(posedge clk); #1;
    // the reference starts from the memory contents the hardware holds
    for (int w = 0; w < DW; w++) begin
      word_t v = dut.u_dmem.mem[w];
      for (int b = 0; b < 4; b++) rm.dmem[4*w+b] = v[8*b +: 8];
    end
    rst = 1'b0;
    while (!done && guard < 20 * prog.size() + 100) begin
      @(posedge clk); #1;
      guard++;
      // sample what retires in the cycle that just began
      if (retire.valid) begin
        s = rm.step();
        n_retired++;
        check(retire.pc == s.pc, $sformatf("%s: pc %h expected %h", name, retire.pc, s.pc));
        check(retire.inst == s.inst, $sformatf("%s: inst %h expected %h at pc %h", name, retire.inst, s.inst, s.pc));
        check(retire.rd_we == s.rd_we, $sformatf("%s: rd_we %0d expected %0d at pc %h", name, retire.rd_we, s.rd_we, s.pc));
        if (s.rd_we) begin
          check(retire.rd == s.rd && retire.rd_data == s.rd_data,
                $sformatf("%s: x%0d=%h expected x%0d=%h at pc %h", name, retire.rd, retire.rd_data, s.rd, s.rd_data, s.pc));
        end
        if (!first) begin
          check(cycle - last_cycle == longint'(p3_gap(prev, s)),
                $sformatf("%s: %0d cycles to pc %h (%h after %h), expected %0d", name, cycle - last_cycle, s.pc, s.inst, prev.inst, p3_gap(prev, s)));
        end
        first = 0; prev = s; last_cycle = cycle;
        if (s.inst == JAL(0, 0)) done = 1;
      end
    end
    check(done, $sformatf("%s: program did not reach its end", name));
    for (int r = 1; r < 32; r++)
      check(dut.u_rf.regs[r] == rm.x[r], $sformatf("%s: final x%0d=%h expected %h", name, r, dut.u_rf.regs[r], rm.x[r]));
    for (int w = 0; w < DW; w++)
      check(dut.u_dmem.mem[w] == rm.mem_word(w), $sformatf("%s: dmem[%0d]=%h expected %h", name, w, dut.u_dmem.mem[w], rm.mem_word(w)));
  endtask

  initial begin
    logic [31:0] prog[$];
    // directed hazard program
    prog = '{
      LUI(8, 0), ADDI(8, 0, 32'h100),
      ADDI(3, 0, 5), ADDI(4, 0, 7), ADDI(6, 0, 1), ADDI(1, 0, 3), ADDI(2, 0, 4),
      ADD(5, 3, 4), ADD(7, 6, 5),          // ALU result bypassed to the next add
      SW(7, 8, 0),
      LW(5, 8, 0), ADD(7, 6, 5),           // load-use: one bubble
      LW(9, 8, 0), ADD(7, 6, 5),           // independent: no bubble
      BNE(1, 1, 12), ADD(5, 3, 4), ADD(6, 1, 2), SUB(7, 6, 5),  // not taken
      BEQ(1, 1, 8), ADD(5, 3, 4), SUB(7, 6, 5),                 // taken: one killed
      JAL(10, 8), ADDI(11, 0, 99), AUIPC(12, 0), JALR(13, 12, 12), ADDI(14, 0, 77),
      ADDI(15, 13, 0), ADDI(0, 0, 0),
      JAL(0, 0)
    };
    run_program(prog, "directed");
    for (int p = 0; p < N_RANDOM; p++) begin
      gen_program(PROG_LEN, prog);
      run_program(prog, $sformatf("random%0d", p));
    end
    $display("retired=%0d bypass_cycles=%0d load_stalls=%0d kills=%0d", n_retired, n_fwd, n_stall, n_kill);
    check(n_fwd > 0,   "no bypass happened");
    check(n_stall > 0, "no load-use stall happened");
    check(n_kill > 0,  "no branch/jump kill happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
