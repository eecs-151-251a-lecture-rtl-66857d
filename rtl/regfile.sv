// regfile: the 32 x 32-bit integer register file ("Reg[]").
//
// Two combinational read ports (AddrA -> DataA, AddrB -> DataB) and one write
// port (AddrD, DataD, RegWEn) written on the rising clock edge. Register x0
// always reads as zero and ignores writes. A write becomes visible to the read
// ports after the edge; there is no write-to-read bypass inside, because the
// processors never need one (the pipeline bypasses around it). The synchronous
// reset that clears all registers is this design's choice, so that simulation
// starts from a known state.
module regfile
  import rv_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     reg_wen,
  input  reg_idx_t addr_d,
  input  word_t    data_d,
  input  reg_idx_t addr_a,
  input  reg_idx_t addr_b,
  output word_t    data_a,
  output word_t    data_b
);

  word_t regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (reg_wen && addr_d != 5'd0) begin
      regs[addr_d] <= data_d;
    end
  end

  assign data_a = (addr_a == 5'd0) ? '0 : regs[addr_a];
  assign data_b = (addr_b == 5'd0) ? '0 : regs[addr_b];

endmodule
