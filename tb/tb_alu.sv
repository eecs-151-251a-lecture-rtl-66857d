// tb_alu: self-checking testbench of the ALU.
//
// Applies random and corner-case operands to every ALUSel operation and
// compares the result with values computed here from the RV32I definitions.
// The operand mix is this testbench's own choice.
`timescale 1ns/1ps
module tb_alu;
  import rv_pkg::*;

  word_t a, b, result;
  alu_sel_e sel;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_sel(sel), .result);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expect_of(alu_sel_e s, word_t x, word_t y);
    case (s)
      ALU_ADD:   return x + y;
      ALU_SUB:   return x + ~y + 1;
      ALU_SLL:   return x << (y % 32);
      ALU_SLT:   return (x[31] != y[31]) ? {31'b0, x[31]} : {31'b0, x < y};
      ALU_SLTU:  return {31'b0, x < y};
      ALU_XOR:   return x ^ y;
      ALU_SRL:   return x >> (y % 32);
      ALU_SRA:   begin
                   word_t r = x >> (y % 32);
                   if (x[31]) r |= ~(32'hFFFF_FFFF >> (y % 32));
                   return r;
                 end
      ALU_OR:    return x | y;
      ALU_AND:   return x & y;
      ALU_PASSB: return y;
      default:   return '0;
    endcase
  endfunction

  word_t corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_001F};

  initial begin
    for (int s = 0; s <= 10; s++) begin
      for (int n = 0; n < 600; n++) begin
        sel = alu_sel_e'(s);
        if (n < 36) begin a = corner[n / 6]; b = corner[n % 6]; end
        else begin a = $urandom; b = $urandom; end
        #1;
        checks++;
        if (result !== expect_of(sel, a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d a=%h b=%h got %h expected %h", s, a, b, result, expect_of(sel, a, b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
