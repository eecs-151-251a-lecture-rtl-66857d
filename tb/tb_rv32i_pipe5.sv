// tb_rv32i_pipe5: self-checking testbench of the 5-stage RV32I pipeline.
//
// This pipeline has no hazard detection, so every program is spread out with
// two no-ops after each instruction (a result is then read at the earliest by
// the third instruction after it, which sees the write-back of the same
// cycle). Runs a directed program (dependent arithmetic, store and loads,
// branches taken and not taken, jal and jalr) and a set of random programs.
// Every retired instruction is compared with the reference model; the cycle
// distance between retirements must be one, or four after a taken branch or
// a jump (three squashed instructions). Final registers and data memory are
// compared too, and squashes must have happened. A last, unspread program
// shows the data hazard the pipeline leaves to software: readers one and two
// instructions after a producer get the old register value, the third gets
// the new one (values worked out by hand). The four-cycle redirect cost
// and the distance-three rule follow from this design's own choices
// (squash on redirect from M, same-cycle register write-through).
`timescale 1ns/1ps
module tb_rv32i_pipe5;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  localparam int IW = 1024;
  localparam int DW = 1024;
  localparam int N_RANDOM = 20;
  localparam int PROG_LEN = 300;  // before spreading

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic load_we = 1'b0;
  logic [$clog2(IW)-1:0] load_addr = '0;
  word_t load_data = '0;
  retire_t retire;

  int checks = 0, failures = 0;
  int n_kill = 0, n_retired = 0;
  longint cycle = 0;

  rv32i_pipe5 #(.IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (
    .clk, .rst, .load_we, .load_addr, .load_data, .retire
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // watchdog
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (dut.m_pc_src) n_kill++;
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
          check(cycle - last_cycle == (prev.redirect ? 4 : 1),
                $sformatf("%s: %0d cycles to pc %h after %h", name, cycle - last_cycle, s.pc, prev.inst));
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

  // x5 = 50 beforehand; add x5,x3,x4 makes it 7. x7 and x8 read x5 too early
  // and get 6 + 50; x9, three instructions later, gets 6 + 7.
  task automatic hazard_program();
    logic [31:0] prog[$];
    bit done = 0;
    prog = '{ADDI(3, 0, 3), ADDI(4, 0, 4), ADDI(5, 0, 50), ADDI(6, 0, 6), NOP_INST, NOP_INST, NOP_INST,
             ADD(5, 3, 4), ADD(7, 6, 5), ADD(8, 6, 5), ADD(9, 6, 5),
             NOP_INST, NOP_INST, NOP_INST, JAL(0, 0)};
    rst = 1'b1;
    foreach (prog[k]) begin
      load_we = 1'b1; load_addr = k[$clog2(IW)-1:0]; load_data = prog[k];
      @(posedge clk); #1;
    end
    load_we = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int g = 0; g < 100 && !done; g++) begin
      @(posedge clk); #1;
      if (retire.valid && retire.inst == JAL(0, 0)) done = 1;
    end
    check(done, "hazard program did not reach its end");
    check(dut.u_rf.regs[5] == 32'd7,  $sformatf("hazard: x5=%0d expected 7", dut.u_rf.regs[5]));
    check(dut.u_rf.regs[7] == 32'd56, $sformatf("hazard: x7=%0d expected stale 56", dut.u_rf.regs[7]));
    check(dut.u_rf.regs[8] == 32'd56, $sformatf("hazard: x8=%0d expected stale 56", dut.u_rf.regs[8]));
    check(dut.u_rf.regs[9] == 32'd13, $sformatf("hazard: x9=%0d expected 13", dut.u_rf.regs[9]));
  endtask

  initial begin
    logic [31:0] prog[$];
    // directed program (spread with no-ops below)
    prog = '{
      LUI(8, 0), ADDI(8, 0, 32'h100),
      ADDI(3, 0, 5), ADDI(4, 0, 7), ADDI(6, 0, 1), ADDI(1, 0, 3), ADDI(2, 0, 4),
      ADD(5, 3, 4), ADD(7, 6, 5),          // dependent arithmetic
      SW(7, 8, 0),
      LW(5, 8, 0), ADD(7, 6, 5),           // load, then a use of it
      LW(9, 8, 0), ADD(7, 6, 5),           // independent load
      BNE(1, 1, 12), ADD(5, 3, 4), ADD(6, 1, 2), SUB(7, 6, 5),  // not taken
      BEQ(1, 1, 8), ADD(5, 3, 4), SUB(7, 6, 5),                 // taken: three squashed
      JAL(10, 8), ADDI(11, 0, 99), AUIPC(12, 0), JALR(13, 12, 12), ADDI(14, 0, 77),
      ADDI(15, 13, 0), ADDI(0, 0, 0),
      JAL(0, 0)
    };
    spread(prog);
    run_program(prog, "directed");
    for (int p = 0; p < N_RANDOM; p++) begin
      gen_program(PROG_LEN, prog);
      spread(prog);
      run_program(prog, $sformatf("random%0d", p));
    end
    hazard_program();
    $display("retired=%0d redirects=%0d", n_retired, n_kill);
    check(n_kill > 0, "no branch/jump squash happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
