// tb_dmem: self-checking testbench of the data memory.
//
// Two instances, one with a combinational read (single-cycle use) and one
// with a registered read (pipeline use), see the same random mix of byte,
// halfword and word stores and of signed and unsigned loads. Results are
// compared with a byte-array model; the registered instance is checked one
// cycle after the address is presented. Widths and extension follow RV32I;
// the byte-array model and the access mix are this testbench's own.
`timescale 1ns/1ps
module tb_dmem;
  import rv_pkg::*;

  localparam int W = 64;
  logic clk = 0;
  word_t addr = 0, data_w = 0, r_async, r_sync;
  mem_rw_e mem_rw = MEM_READ;
  logic [2:0] funct3 = 3'b010;
  logic [7:0] model [4*W];
  int checks = 0, failures = 0;

  dmem #(.WORDS(W), .SYNC_READ(1'b0)) dut_a (.clk, .addr, .data_w, .mem_rw, .funct3, .data_r(r_async));
  dmem #(.WORDS(W), .SYNC_READ(1'b1)) dut_s (.clk, .addr, .data_w, .mem_rw, .funct3, .data_r(r_sync));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t load_model(word_t a, logic [2:0] f3);
    int i = int'(a % (4 * W));
    case (f3)
      3'b000: return {{24{model[i][7]}}, model[i]};
      3'b100: return {24'b0, model[i]};
      3'b001: return {{16{model[i+1][7]}}, model[i+1], model[i]};
      3'b101: return {16'b0, model[i+1], model[i]};
      default: return {model[i+3], model[i+2], model[i+1], model[i]};
    endcase
  endfunction

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    // initialise both arrays through word stores
    for (int w = 0; w < W; w++) begin
      addr = 4 * w; data_w = $urandom; funct3 = 3'b010; mem_rw = MEM_WRITE;
      for (int b = 0; b < 4; b++) model[4*w+b] = data_w[8*b +: 8];
      @(posedge clk); #1;
    end
    for (int n = 0; n < 6000; n++) begin
      logic [2:0] f3;
      word_t exp_v;
      int sz;
      case ($urandom_range(0, 4))
        0: f3 = 3'b000; 1: f3 = 3'b100; 2: f3 = 3'b001; 3: f3 = 3'b101; default: f3 = 3'b010;
      endcase
      sz = (f3[1:0] == 2'b00) ? 1 : (f3[1:0] == 2'b01) ? 2 : 4;
      addr = $urandom_range(0, 4 * W - 1) & ~(sz - 1);
      if (n % 7 == 0) addr += 4 * W;     // wraps
      funct3 = f3;
      if ($urandom_range(0, 1)) begin
        mem_rw = MEM_WRITE; data_w = $urandom;
        @(posedge clk); #1;
        for (int b = 0; b < sz; b++) model[(addr % (4 * W)) + b] = data_w[8*b +: 8];
      end else begin
        mem_rw = MEM_READ; exp_v = load_model(addr, f3);
        #1;
        chk(r_async == exp_v, $sformatf("async load f3=%0d addr=%h got %h expected %h", f3, addr, r_async, exp_v));
        @(posedge clk); #1;
        chk(r_sync == exp_v, $sformatf("sync load f3=%0d addr=%h got %h expected %h", f3, addr, r_sync, exp_v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
