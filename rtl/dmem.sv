// dmem: data memory ("DMEM") with byte, halfword and word access.
//
// WORDS 32-bit words. Addr comes from the ALU, DataW from Reg[rs2], MemRW
// selects a write, and funct3 of the load or store gives the width (b, h, w)
// and, for loads, sign or zero extension (lb/lh vs lbu/lhu). Stores shift
// DataW into the addressed byte lanes and write only those lanes on the
// rising clock edge. Loads select the addressed bytes of the word and extend
// them onto DataR. Accesses are assumed naturally aligned; addr[1:0] picks
// the lanes and higher address bits beyond the array wrap.
//
// SYNC_READ = 0 gives a combinational read, as the single-cycle processor
// needs. SYNC_READ = 1 registers the read on the same rising edge that would
// perform a write, so the data appears during the following cycle; this is
// how the 3-stage pipeline uses it (reads and writes clocked at the start of
// its M stage). The size, the byte-lane logic placed inside the memory and the
// read-old-data behaviour are this design's choices.
module dmem
  import rv_pkg::*;
#(
  parameter int unsigned WORDS     = 1024,
  parameter bit          SYNC_READ = 1'b0
) (
  input  logic       clk,
  input  word_t      addr,
  input  word_t      data_w,
  input  mem_rw_e    mem_rw,
  input  logic [2:0] funct3,
  output word_t      data_r
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  logic [AW-1:0] widx;
  logic [3:0]    byte_en;
  word_t         wdata_sh;

  assign widx = addr[AW+1:2];

  // byte enables and lane-aligned store data
  always_comb begin
    unique case (funct3[1:0])
      2'b00: begin
        byte_en  = 4'b0001 << addr[1:0];
        wdata_sh = {4{data_w[7:0]}};
      end
      2'b01: begin
        byte_en  = addr[1] ? 4'b1100 : 4'b0011;
        wdata_sh = {2{data_w[15:0]}};
      end
      default: begin
        byte_en  = 4'b1111;
        wdata_sh = data_w;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (mem_rw == MEM_WRITE) begin
      for (int i = 0; i < 4; i++) begin
        if (byte_en[i]) mem[widx][8*i +: 8] <= wdata_sh[8*i +: 8];
      end
    end
  end

  // read path: raw word, plus the low address bits and width that select
  // and extend the loaded bytes
  word_t      rword;
  logic [1:0] roff;
  logic [2:0] rf3;

  if (SYNC_READ) begin : g_sync
    always_ff @(posedge clk) begin
      rword <= mem[widx];
      roff  <= addr[1:0];
      rf3   <= funct3;
    end
  end else begin : g_async
    assign rword = mem[widx];
    assign roff  = addr[1:0];
    assign rf3   = funct3;
  end

  logic [7:0]  rbyte;
  logic [15:0] rhalf;

  always_comb begin
    rbyte = rword[8*roff +: 8];
    rhalf = roff[1] ? rword[31:16] : rword[15:0];
    unique case (rf3)
      F3_B:    data_r = {{24{rbyte[7]}}, rbyte};
      F3_H:    data_r = {{16{rhalf[15]}}, rhalf};
      F3_BU:   data_r = {24'b0, rbyte};
      F3_HU:   data_r = {16'b0, rhalf};
      default: data_r = rword;
    endcase
  end

endmodule
