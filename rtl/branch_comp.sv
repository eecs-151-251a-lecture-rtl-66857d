// branch_comp: the branch comparator ("Branch Comp.") of the RV32I datapath.
//
// Compares the two register operands A and B. BrEq is 1 when A = B; BrLT is 1
// when A < B, as a signed comparison when BrUn = 0 and an unsigned one when
// BrUn = 1. The controller derives bne from !BrEq and bge/bgeu from !BrLT.
// Purely combinational. Ports and behaviour are the standard comparator of
// this datapath; nothing here is this design's own beyond the coding.
module branch_comp
  import rv_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  logic  br_un,
  output logic  br_eq,
  output logic  br_lt
);

  always_comb begin
    br_eq = (a == b);
    br_lt = br_un ? (a < b) : ($signed(a) < $signed(b));
  end

endmodule
