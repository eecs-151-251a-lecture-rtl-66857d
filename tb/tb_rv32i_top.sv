// tb_rv32i_top: end-to-end testbench of the three processors at their
// default sizes.
//
// Dense programs (the directed hazard program, then random programs) run on
// the single-cycle and the 3-stage processor concurrently. Spread programs
// (the same kind with two no-ops after each instruction, as the 5-stage
// pipeline without hazard detection needs) run on all three. Each
// processor's retire stream is checked instruction by instruction against
// its own reference model, with its timing: one cycle per instruction for
// the single-cycle processor; for the 3-stage pipeline one cycle plus one
// after a taken branch or jump plus one for a load-use dependence; for the
// 5-stage pipeline one cycle, or four after a taken branch or jump. At the
// end all register files and data memories are compared with the models.
// Counted, and required to happen at least once: ALU bypass, load-use stall,
// independent load without stall, taken branch kill in the 3-stage pipeline,
// branch not taken, jal, jalr, load, store, and redirect squash in the
// 5-stage pipeline. The timing rules are those of each organisation as
// built; the programs and the counters are this testbench's own.
`timescale 1ns/1ps
module tb_rv32i_top;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  localparam int IW = 1024;   // default sizes of rv32i_top
  localparam int DW = 1024;
  localparam int N_RANDOM = 10;
  localparam int PROG_LEN = 400;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic load_we = 1'b0;
  logic [$clog2(IW)-1:0] load_addr = '0;
  word_t load_data = '0;
  retire_t sc_retire, p3_retire, p5_retire;
  logic p5_load_we = 1'b0;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_stall = 0, n_kill = 0, n_not_taken = 0, n_jal = 0, n_jalr = 0;
  int n_load = 0, n_store = 0, n_load_nostall = 0, n_p5_squash = 0;
  longint cycle = 0, p3_cycles = 0, p3_insts = 0;

  rv32i_top dut (
    .clk, .rst,
    .sc_load_we(load_we), .sc_load_addr(load_addr), .sc_load_data(load_data), .sc_retire,
    .p3_load_we(load_we), .p3_load_addr(load_addr), .p3_load_data(load_data), .p3_retire,
    .p5_load_we, .p5_load_addr(load_addr), .p5_load_data(load_data), .p5_retire
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (dut.u_p3.fwd_a || dut.u_p3.fwd_b) n_fwd++;
    if (dut.u_p3.stall) n_stall++;
    if (dut.u_p3.kill)  n_kill++;
    if (dut.u_p5.m_pc_src) n_p5_squash++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic compare(input string who, input retire_t r, input ref_step_t s);
    check(r.pc == s.pc && r.inst == s.inst, $sformatf("%s: pc %h inst %h expected %h %h", who, r.pc, r.inst, s.pc, s.inst));
    check(r.rd_we == s.rd_we, $sformatf("%s: rd_we at pc %h", who, s.pc));
    if (s.rd_we)
      check(r.rd == s.rd && r.rd_data == s.rd_data,
            $sformatf("%s: x%0d=%h expected x%0d=%h at pc %h", who, r.rd, r.rd_data, s.rd, s.rd_data, s.pc));
  endtask

  task automatic run_sc(input rv_ref_model rm, input string name, input int limit);
    ref_step_t s;
    longint last = 0;
    bit first = 1;
    for (int g = 0; g < limit; g++) begin
      @(negedge clk);
      if (sc_retire.valid) begin
        s = rm.step();
        compare({name, " single-cycle"}, sc_retire, s);
        if (!first) check(cycle - last == 1, $sformatf("%s single-cycle: CPI not 1 at pc %h", name, s.pc));
        first = 0; last = cycle;
        if (s.inst == JAL(0, 0)) return;
      end
    end
    check(0, {name, " single-cycle: did not finish"});
  endtask

  task automatic run_p3(input rv_ref_model rm, input string name, input int limit);
    ref_step_t s, prev;
    longint last = 0, start = cycle;
    bit first = 1;
    for (int g = 0; g < limit; g++) begin
      @(posedge clk); #1;
      if (p3_retire.valid) begin
        s = rm.step();
        compare({name, " pipe3"}, p3_retire, s);
        if (!first) begin
          check(cycle - last == longint'(p3_gap(prev, s)), $sformatf("%s pipe3: timing at pc %h", name, s.pc));
          if (prev.is_load && p3_gap(prev, s) == 1 && !prev.redirect) n_load_nostall++;
        end
        case (s.inst[6:0])
          7'b1100011: if (!s.redirect) n_not_taken++;
          7'b1101111: n_jal++;
          7'b1100111: n_jalr++;
          7'b0000011: n_load++;
          7'b0100011: n_store++;
          default: ;
        endcase
        first = 0; prev = s; last = cycle;
        if (s.inst == JAL(0, 0)) begin
          p3_cycles += cycle - start;
          return;
        end
        p3_insts++;
      end
    end
    check(0, {name, " pipe3: did not finish"});
  endtask

  task automatic run_p5(input rv_ref_model rm, input string name, input int limit);
    ref_step_t s, prev;
    longint last = 0;
    bit first = 1;
    for (int g = 0; g < limit; g++) begin
      @(posedge clk); #1;
      if (p5_retire.valid) begin
        s = rm.step();
        compare({name, " pipe5"}, p5_retire, s);
        if (!first) check(cycle - last == (prev.redirect ? 4 : 1), $sformatf("%s pipe5: timing at pc %h", name, s.pc));
        first = 0; prev = s; last = cycle;
        if (s.inst == JAL(0, 0)) return;
      end
    end
    check(0, {name, " pipe5: did not finish"});
  endtask

  task automatic final_state(input rv_ref_model rm_sc, input rv_ref_model rm_p3, input rv_ref_model rm_p5,
                             input bit with_p5, input string name);
    for (int r = 1; r < 32; r++) begin
      check(dut.u_sc.u_rf.regs[r] == rm_sc.x[r], $sformatf("%s single-cycle: final x%0d", name, r));
      check(dut.u_p3.u_rf.regs[r] == rm_p3.x[r], $sformatf("%s pipe3: final x%0d", name, r));
      if (with_p5) check(dut.u_p5.u_rf.regs[r] == rm_p5.x[r], $sformatf("%s pipe5: final x%0d", name, r));
    end
    for (int w = 0; w < DW; w++) begin
      check(dut.u_sc.u_dmem.mem[w] == rm_sc.mem_word(w), $sformatf("%s single-cycle: dmem[%0d]", name, w));
      check(dut.u_p3.u_dmem.mem[w] == rm_p3.mem_word(w), $sformatf("%s pipe3: dmem[%0d]", name, w));
      if (with_p5) check(dut.u_p5.u_dmem.mem[w] == rm_p5.mem_word(w), $sformatf("%s pipe5: dmem[%0d]", name, w));
    end
  endtask

  task automatic run_program(input logic [31:0] prog[$], input string name, input bit with_p5);
    rv_ref_model rm_sc = new(IW, DW);
    rv_ref_model rm_p3 = new(IW, DW);
    rv_ref_model rm_p5 = new(IW, DW);
    int limit = 20 * prog.size() + 100;
    rst = 1'b1;
    foreach (prog[k]) begin
      rm_sc.imem[k] = prog[k];
      rm_p3.imem[k] = prog[k];
      rm_p5.imem[k] = prog[k];
      p5_load_we = with_p5;
      load_we = 1'b1; load_addr = k[$clog2(IW)-1:0]; load_data = prog[k];
      @(posedge clk); #1;
    end
    load_we = 1'b0;
    p5_load_we = 1'b0;
    @(posedge clk); #1;
    for (int w = 0; w < DW; w++) begin
      word_t vs = dut.u_sc.u_dmem.mem[w];
      word_t vp = dut.u_p3.u_dmem.mem[w];
      word_t v5 = dut.u_p5.u_dmem.mem[w];
      for (int b = 0; b < 4; b++) begin
        rm_sc.dmem[4*w+b] = vs[8*b +: 8];
        rm_p3.dmem[4*w+b] = vp[8*b +: 8];
        rm_p5.dmem[4*w+b] = v5[8*b +: 8];
      end
    end
    rst = 1'b0;
    fork
      run_sc(rm_sc, name, limit);
      run_p3(rm_p3, name, limit);
      if (with_p5) run_p5(rm_p5, name, limit);
    join
    final_state(rm_sc, rm_p3, rm_p5, with_p5, name);
  endtask

  initial begin
    logic [31:0] prog[$];
    prog = '{
      LUI(8, 0), ADDI(8, 0, 32'h100),
      ADDI(3, 0, 5), ADDI(4, 0, 7), ADDI(6, 0, 1), ADDI(1, 0, 3), ADDI(2, 0, 4),
      ADD(5, 3, 4), ADD(7, 6, 5),
      SW(7, 8, 0),
      LW(5, 8, 0), ADD(7, 6, 5),
      LW(9, 8, 0), ADD(7, 6, 5),
      BNE(1, 1, 12), ADD(5, 3, 4), ADD(6, 1, 2), SUB(7, 6, 5),
      BEQ(1, 1, 8), ADD(5, 3, 4), SUB(7, 6, 5),
      JAL(10, 8), ADDI(11, 0, 99), AUIPC(12, 0), JALR(13, 12, 12), ADDI(14, 0, 77),
      ADDI(15, 13, 0), ADDI(0, 0, 0),
      JAL(0, 0)
    };
    run_program(prog, "directed", 1'b0);
    spread(prog);
    run_program(prog, "directed spread", 1'b1);
    for (int p = 0; p < N_RANDOM; p++) begin
      gen_program(PROG_LEN, prog);
      run_program(prog, $sformatf("random%0d", p), 1'b0);
    end
    for (int p = 0; p < N_RANDOM / 2; p++) begin
      gen_program(PROG_LEN / 3, prog);
      spread(prog);
      run_program(prog, $sformatf("spread%0d", p), 1'b1);
    end
    $display("pipe3: %0d instructions in %0d cycles (CPI %0.3f)", p3_insts, p3_cycles,
             real'(p3_cycles) / real'(p3_insts));
    $display("events: bypass=%0d load_stall=%0d load_no_stall=%0d kill=%0d not_taken=%0d jal=%0d jalr=%0d load=%0d store=%0d p5_squash=%0d",
             n_fwd, n_stall, n_load_nostall, n_kill, n_not_taken, n_jal, n_jalr, n_load, n_store, n_p5_squash);
    check(n_p5_squash > 0,    "no 5-stage redirect squash happened");
    check(n_fwd > 0,          "no ALU bypass happened");
    check(n_stall > 0,        "no load-use stall happened");
    check(n_load_nostall > 0, "no independent load ran without a stall");
    check(n_kill > 0,         "no taken branch or jump killed a fetch");
    check(n_not_taken > 0,    "no branch was not taken");
    check(n_jal > 0,          "no jal executed");
    check(n_jalr > 0,         "no jalr executed");
    check(n_load > 0,         "no load executed");
    check(n_store > 0,        "no store executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
