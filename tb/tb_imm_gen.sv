// tb_imm_gen: self-checking testbench of the immediate generator.
//
// Builds instructions from chosen immediates with the format layouts (I, S,
// B, J, U) and checks that the generator recovers the original immediate:
// sign extension, the even B and J offsets and the U shift. The layouts
// checked are the RV32I ones; the immediate values tried are this
// testbench's choice.
`timescale 1ns/1ps
module tb_imm_gen;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  word_t inst, imm;
  imm_sel_e sel;
  int checks = 0, failures = 0;

  imm_gen dut (.inst(inst[31:7]), .imm_sel(sel), .imm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input imm_sel_e s, input word_t i, input word_t expected);
    sel = s; inst = i; #1;
    checks++;
    if (imm !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL sel=%0d inst=%h imm=%h expected %h", s, i, imm, expected);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int v12 = int'($urandom_range(0, 4095)) - 2048;
      int v13 = 2 * (int'($urandom_range(0, 4095)) - 2048);
      int v21 = 2 * (int'($urandom_range(0, 32'hFFFFF)) - 32'h80000);
      int u20 = int'($urandom_range(0, 32'hFFFFF));
      if (n == 0) begin v12 = -2048; v13 = -4096; v21 = -(1 << 20); end
      if (n == 1) begin v12 = 2047;  v13 = 4094;  v21 = (1 << 20) - 2; end
      try(IMM_I, enc_i(v12, $urandom_range(0, 31), 3'($urandom), $urandom_range(0, 31), 7'b0010011), word_t'(v12));
      try(IMM_S, enc_s(v12, $urandom_range(0, 31), $urandom_range(0, 31), 3'($urandom)), word_t'(v12));
      try(IMM_B, enc_b(v13, $urandom_range(0, 31), $urandom_range(0, 31), 3'($urandom)), word_t'(v13));
      try(IMM_J, enc_j(v21, $urandom_range(0, 31)), word_t'(v21));
      try(IMM_U, enc_u(u20, $urandom_range(0, 31), 7'b0110111), word_t'(u20) << 12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
