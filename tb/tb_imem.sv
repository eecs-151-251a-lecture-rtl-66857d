// tb_imem: self-checking testbench of the instruction memory.
//
// Loads random words through the load port, then reads them back by byte
// address (the two low bits ignored), including addresses that wrap past the
// end of the array. Word addressing by pc[..:2] follows from 4-byte
// instructions; the wrap-around is this design's choice, checked here.
`timescale 1ns/1ps
module tb_imem;
  import rv_pkg::*;

  localparam int W = 256;
  logic clk = 0, load_we = 0;
  logic [$clog2(W)-1:0] load_addr = 0;
  word_t load_data = 0, addr = 0, inst;
  word_t model [W];
  int checks = 0, failures = 0;

  imem #(.WORDS(W)) dut (.clk, .load_we, .load_addr, .load_data, .addr, .inst);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      model[i] = $urandom;
      load_we = 1; load_addr = i[$clog2(W)-1:0]; load_data = model[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int n = 0; n < 3000; n++) begin
      addr = $urandom;
      #1;
      checks++;
      if (inst !== model[(addr >> 2) % W]) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h inst=%h expected %h", addr, inst, model[(addr >> 2) % W]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
