// tb_branch_comp: self-checking testbench of the branch comparator.
//
// Checks BrEq and BrLT, signed (BrUn = 0) and unsigned (BrUn = 1), on corner
// values and random operands, including equal operands. The expected values
// follow the comparator's definition (BrEq for A = B, BrLT for A < B); the
// operand mix is this testbench's own.
`timescale 1ns/1ps
module tb_branch_comp;
  import rv_pkg::*;

  word_t a, b;
  logic br_un, br_eq, br_lt;
  int checks = 0, failures = 0;

  branch_comp dut (.a, .b, .br_un, .br_eq, .br_lt);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t corner [5] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF};

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic exp_lt;
      br_un = n[0];
      if (n < 50) begin a = corner[(n / 2) / 5]; b = corner[(n / 2) % 5]; end
      else begin
        a = $urandom; b = ($urandom_range(0, 7) == 0) ? a : $urandom;
        if ($urandom_range(0, 3) == 0) b[31] = a[31];
      end
      #1;
      // signed: flip the sign bits and compare unsigned
      exp_lt = br_un ? (a < b) : ({~a[31], a[30:0]} < {~b[31], b[30:0]});
      checks++;
      if (br_eq !== (a == b) || br_lt !== exp_lt) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h un=%0d eq=%0d lt=%0d", a, b, br_un, br_eq, br_lt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
