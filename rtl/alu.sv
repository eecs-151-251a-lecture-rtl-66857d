// alu: the arithmetic/logic unit of the RV32I datapath.
//
// Computes result = A op B for the operation chosen by ALUSel: add, sub,
// shifts (by B[4:0]), signed and unsigned set-less-than, xor, or, and, and a
// pass-through of B used by lui. Address arithmetic for loads, stores,
// branches and jumps also uses the add. The set of operations is the RV32I
// integer set; their codes are this design's own, as is the pass-B
// operation (the ALU takes the place of a separate lui path). Purely
// combinational.
module alu
  import rv_pkg::*;
(
  input  word_t    a,
  input  word_t    b,
  input  alu_sel_e alu_sel,
  output word_t    result
);

  always_comb begin
    unique case (alu_sel)
      ALU_ADD:   result = a + b;
      ALU_SUB:   result = a - b;
      ALU_SLL:   result = a << b[4:0];
      ALU_SLT:   result = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  result = {31'b0, a < b};
      ALU_XOR:   result = a ^ b;
      ALU_SRL:   result = a >> b[4:0];
      ALU_SRA:   result = word_t'($signed(a) >>> b[4:0]);
      ALU_OR:    result = a | b;
      ALU_AND:   result = a & b;
      ALU_PASSB: result = b;
      default:   result = '0;
    endcase
  end

endmodule
