// tb_pipe3_hazard: self-checking testbench of the 3-stage hazard unit.
//
// Directed cases: the classic bypass (add x5 ... then add x7, x6, x5), the
// load-use stall (lw x5 then add x7, x6, x5), no stall for an independent
// instruction or a load to x0, kill on a redirect, and no bypass from an
// invalid or non-writing M stage, from x0, or to an operand the instruction
// does not read. Then random cases against a rule model written here. The
// directed cases are the classic 3-stage examples; the random rule model
// is this testbench's own restatement of the three rules.
`timescale 1ns/1ps
module tb_pipe3_hazard;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  word_t i_inst, x_inst;
  logic x_valid, x_is_load, x_redirect, m_valid, m_reg_wen;
  reg_idx_t m_rd;
  logic fwd_a, fwd_b, stall, kill;
  int checks = 0, failures = 0;

  pipe3_hazard dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect4(input logic ea, input logic eb, input logic es, input logic ek, input string nm);
    #1;
    checks++;
    if ({fwd_a, fwd_b, stall, kill} !== {ea, eb, es, ek}) begin
      failures++;
      if (failures < 20) $display("FAIL %s: fwd_a=%0d fwd_b=%0d stall=%0d kill=%0d", nm, fwd_a, fwd_b, stall, kill);
    end
  endtask

  task automatic set(input word_t ii, input logic xv, input word_t xi, input logic xl, input logic xr,
                     input logic mv, input logic mw, input int md);
    i_inst = ii; x_valid = xv; x_inst = xi; x_is_load = xl; x_redirect = xr;
    m_valid = mv; m_reg_wen = mw; m_rd = 5'(md);
  endtask

  initial begin
    // add x5,x3,x4 in M; add x7,x6,x5 in X -> bypass on operand B
    set(NOP_INST, 1, ADD(7, 6, 5), 0, 0, 1, 1, 5); expect4(0, 1, 0, 0, "bypass B");
    set(NOP_INST, 1, ADD(7, 5, 6), 0, 0, 1, 1, 5); expect4(1, 0, 0, 0, "bypass A");
    set(NOP_INST, 1, ADD(7, 5, 5), 0, 0, 1, 1, 5); expect4(1, 1, 0, 0, "bypass both");
    set(NOP_INST, 1, SW(5, 8, 0),  0, 0, 1, 1, 5); expect4(0, 1, 0, 0, "store data bypass");
    set(NOP_INST, 1, ADD(7, 6, 5), 0, 0, 0, 1, 5); expect4(0, 0, 0, 0, "M invalid");
    set(NOP_INST, 1, ADD(7, 6, 5), 0, 0, 1, 0, 5); expect4(0, 0, 0, 0, "M not writing");
    set(NOP_INST, 1, ADD(7, 0, 0), 0, 0, 1, 1, 0); expect4(0, 0, 0, 0, "x0 never bypassed");
    set(NOP_INST, 1, ADDI(7, 6, 5), 0, 0, 1, 1, 5); expect4(0, 0, 0, 0, "addi does not read rs2 field");
    set(NOP_INST, 1, LUI(7, 32'h2A5), 0, 0, 1, 1, 5); expect4(0, 0, 0, 0, "lui reads nothing");
    set(NOP_INST, 0, ADD(7, 6, 5), 0, 0, 1, 1, 5); expect4(0, 0, 0, 0, "X bubble");
    // lw x5 in X, add x7,x6,x5 in I -> stall
    set(ADD(7, 6, 5), 1, LW(5, 4, 0), 1, 0, 0, 0, 0); expect4(0, 0, 1, 0, "load-use stall");
    set(SW(5, 4, 0),  1, LW(5, 4, 0), 1, 0, 0, 0, 0); expect4(0, 0, 1, 0, "load then store of it");
    set(ADD(7, 6, 4), 1, LW(5, 4, 0), 1, 0, 0, 0, 0); expect4(0, 0, 0, 0, "independent: no stall");
    set(LUI(5, 1),    1, LW(5, 4, 0), 1, 0, 0, 0, 0); expect4(0, 0, 0, 0, "lui after load: no stall");
    set(ADD(7, 0, 0), 1, LW(0, 4, 0), 1, 0, 0, 0, 0); expect4(0, 0, 0, 0, "load to x0: no stall");
    set(ADD(7, 6, 5), 0, LW(5, 4, 0), 1, 0, 0, 0, 0); expect4(0, 0, 0, 0, "invalid load: no stall");
    // taken branch in X kills the fetch behind it
    set(ADD(5, 3, 4), 1, BEQ(1, 1, 8), 0, 1, 0, 0, 0); expect4(0, 0, 0, 1, "taken branch kill");
    set(ADD(5, 3, 4), 1, BNE(1, 1, 8), 0, 0, 0, 0, 0); expect4(0, 0, 0, 0, "not taken");
    set(ADD(5, 3, 4), 0, BEQ(1, 1, 8), 0, 1, 0, 0, 0); expect4(0, 0, 0, 0, "bubble cannot kill");
    // random against the rule model
    for (int n = 0; n < 3000; n++) begin
      logic ea, eb, es, ek;
      word_t insts [6];
      insts = '{ADD(rreg(), rreg(), rreg()), ADDI(rreg(), rreg(), 3), LW(rreg(), rreg(), 0),
                SW(rreg(), rreg(), 0), BEQ(rreg(), rreg(), 8), LUI(rreg(), 1)};
      i_inst = insts[$urandom_range(0, 5)];
      x_inst = insts[$urandom_range(0, 5)];
      x_valid = 1'($urandom); x_is_load = (x_inst[6:0] == 7'b0000011);
      x_redirect = (x_inst[6:0] == 7'b1100011) && 1'($urandom);
      m_valid = 1'($urandom); m_reg_wen = 1'($urandom); m_rd = 5'(rreg());
      ea = x_valid && m_valid && m_reg_wen && ref_reads_rs1(x_inst) && x_inst[19:15] == m_rd;
      eb = x_valid && m_valid && m_reg_wen && ref_reads_rs2(x_inst) && x_inst[24:20] == m_rd;
      es = x_valid && x_is_load && ((ref_reads_rs1(i_inst) && i_inst[19:15] == x_inst[11:7]) ||
                                    (ref_reads_rs2(i_inst) && i_inst[24:20] == x_inst[11:7]));
      ek = x_valid && x_redirect;
      expect4(ea, eb, es, ek, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
