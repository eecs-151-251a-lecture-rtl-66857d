// tb_regfile: self-checking testbench of the register file.
//
// Random writes and reads on both ports against a model array: writes land on
// the clock edge, x0 stays zero, reset clears all registers, and a write with
// RegWEn low changes nothing. Reset clearing is this design's choice and is
// checked as such; the rest is the usual 2-read, 1-write register file.
`timescale 1ns/1ps
module tb_regfile;
  import rv_pkg::*;

  logic clk = 0, rst = 1, reg_wen = 0;
  reg_idx_t addr_d = 0, addr_a = 0, addr_b = 0;
  word_t data_d = 0, data_a, data_b;
  word_t model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .reg_wen, .addr_d, .data_d, .addr_a, .addr_b, .data_a, .data_b);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 32; r++) begin
      addr_a = 5'(r); addr_b = 5'(31 - r); #1;
      chk(data_a == 0 && data_b == 0, $sformatf("x%0d not cleared by reset", r));
    end
    for (int n = 0; n < 5000; n++) begin
      reg_wen = ($urandom_range(0, 3) != 0);
      addr_d  = 5'($urandom);
      if (n % 50 == 0) addr_d = 0;
      data_d  = $urandom;
      addr_a  = 5'($urandom); addr_b = 5'($urandom);
      #1;
      chk(data_a == model[addr_a] && data_b == model[addr_b],
          $sformatf("read x%0d=%h x%0d=%h", addr_a, data_a, addr_b, data_b));
      @(posedge clk);
      if (reg_wen && addr_d != 0) model[addr_d] = data_d;
      #1;
      addr_a = addr_d; #1;
      chk(data_a == model[addr_d], $sformatf("after write x%0d=%h expected %h", addr_d, data_a, model[addr_d]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
