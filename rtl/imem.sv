// imem: instruction memory ("IMEM").
//
// WORDS 32-bit words, read combinationally: inst = mem[addr[AW+1:2]], the two
// low address bits being ignored (instructions are word aligned). Addresses
// beyond the array wrap. A separate write port (load_we, load_addr as a word
// index, load_data), clocked on the rising edge, lets a host or testbench
// place the program before reset is released. The size and the load port are
// this design's choices; the datapath drawings show only an address in and an
// instruction out.
module imem
  import rv_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic                     load_we,
  input  logic [$clog2(WORDS)-1:0] load_addr,
  input  word_t                    load_data,
  input  word_t                    addr,
  output word_t                    inst
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign inst = mem[addr[AW+1:2]];

endmodule
