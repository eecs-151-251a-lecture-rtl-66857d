// rv_tb_pkg: shared testbench support for the RV32I processors.
//
// * Instruction encoders (enc_* and the named helpers) that build RV32I
//   machine words from fields, written directly from the base-ISA formats.
// * rv_ref_model, an instruction-level reference model of RV32I written
//   independently of the RTL (its own decoder, no use of the design's
//   control encodings). step() executes one instruction and returns what it
//   wrote, so a testbench can compare it with the processor's retire record.
// * gen_program(), a random program generator that mixes dependent ALU
//   operations, loads and stores, forward branches and jumps, then ends in a
//   self-loop. It is seeded from $urandom.
// * Timing rules of the 3-stage pipeline (p3_gap) used to check cycle counts.
// The model follows the RV32I base specification; the program mix and the
// register and address conventions of the generator are this package's own.
package rv_tb_pkg;

  // ------------------------------------------------------------ encoders
  function automatic logic [31:0] enc_r(input logic [6:0] f7, input int rs2, input int rs1,
                                        input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] enc_i(input int imm, input int rs1, input logic [2:0] f3,
                                        input int rd, input logic [6:0] op);
    logic [31:0] v = 32'(imm);
    return {v[11:0], 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] enc_s(input int imm, input int rs2, input int rs1,
                                        input logic [2:0] f3);
    logic [31:0] v = 32'(imm);
    return {v[11:5], 5'(rs2), 5'(rs1), f3, v[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] enc_b(input int imm, input int rs2, input int rs1,
                                        input logic [2:0] f3);
    logic [31:0] v = 32'(imm);
    return {v[12], v[10:5], 5'(rs2), 5'(rs1), f3, v[4:1], v[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] enc_j(input int imm, input int rd);
    logic [31:0] v = 32'(imm);
    return {v[20], v[10:1], v[11], v[19:12], 5'(rd), 7'b1101111};
  endfunction

  function automatic logic [31:0] enc_u(input int imm20, input int rd, input logic [6:0] op);
    logic [31:0] v = 32'(imm20);
    return {v[19:0], 5'(rd), op};
  endfunction

  function automatic logic [31:0] ADD (int rd, int rs1, int rs2); return enc_r(7'h00, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB (int rd, int rs1, int rs2); return enc_r(7'h20, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] ADDI(int rd, int rs1, int imm); return enc_i(imm, rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] LW  (int rd, int rs1, int imm); return enc_i(imm, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SW  (int rs2, int rs1, int imm); return enc_s(imm, rs2, rs1, 3'b010); endfunction
  function automatic logic [31:0] BEQ (int rs1, int rs2, int off); return enc_b(off, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] BNE (int rs1, int rs2, int off); return enc_b(off, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] JAL (int rd, int off);           return enc_j(off, rd); endfunction
  function automatic logic [31:0] JALR(int rd, int rs1, int imm);  return enc_i(imm, rs1, 3'b000, rd, 7'b1100111); endfunction
  function automatic logic [31:0] LUI (int rd, int imm20);         return enc_u(imm20, rd, 7'b0110111); endfunction
  function automatic logic [31:0] AUIPC(int rd, int imm20);        return enc_u(imm20, rd, 7'b0010111); endfunction

  // ------------------------------------------------------ operand usage
  function automatic bit ref_reads_rs1(logic [31:0] i);
    return i[6:0] inside {7'b1100111, 7'b1100011, 7'b0000011, 7'b0100011, 7'b0010011, 7'b0110011};
  endfunction
  function automatic bit ref_reads_rs2(logic [31:0] i);
    return i[6:0] inside {7'b1100011, 7'b0100011, 7'b0110011};
  endfunction

  // What one executed instruction did.
  typedef struct {
    logic [31:0] pc;
    logic [31:0] inst;
    bit          rd_we;
    logic [4:0]  rd;
    logic [31:0] rd_data;
    bit          redirect;  // taken branch or jump
    bit          is_load;
  } ref_step_t;

  // Extra cycles the 3-stage pipeline spends between two retiring
  // instructions: one after a taken branch or a jump (the killed fetch) and
  // one when a load is followed by an instruction that reads its result.
  function automatic int p3_gap(ref_step_t prev, ref_step_t cur);
    int g = 1;
    if (prev.redirect) g++;
    if (prev.is_load && prev.rd != 0 &&
        ((ref_reads_rs1(cur.inst) && cur.inst[19:15] == prev.rd) ||
         (ref_reads_rs2(cur.inst) && cur.inst[24:20] == prev.rd))) g++;
    return g;
  endfunction

  // ------------------------------------------------------ reference model
  class rv_ref_model;
    logic [31:0] x [32];
    logic [31:0] pc;
    logic [31:0] imem [];
    logic [7:0]  dmem [];

    function new(int imem_words, int dmem_words);
      imem = new[imem_words];
      dmem = new[dmem_words * 4];
      foreach (imem[i]) imem[i] = 32'h0000_0013;
      foreach (dmem[i]) dmem[i] = 8'h00;
      foreach (x[i])    x[i] = 32'h0;
      pc = 32'h0;
    endfunction

    function logic [7:0] rd8(logic [31:0] a);
      return dmem[a % dmem.size()];
    endfunction

    function void wr8(logic [31:0] a, logic [7:0] v);
      dmem[a % dmem.size()] = v;
    endfunction

    function logic [31:0] mem_word(int widx);
      return {dmem[4*widx+3], dmem[4*widx+2], dmem[4*widx+1], dmem[4*widx]};
    endfunction

    function ref_step_t step();
      ref_step_t s;
      logic [31:0] i, a, b, res, nxt, immi, imms, immb, immj, immu, ea;
      logic [2:0]  f3;
      i    = imem[(pc >> 2) % imem.size()];
      a    = x[i[19:15]];
      b    = x[i[24:20]];
      f3   = i[14:12];
      immi = {{20{i[31]}}, i[31:20]};
      imms = {{20{i[31]}}, i[31:25], i[11:7]};
      immb = {{19{i[31]}}, i[31], i[7], i[30:25], i[11:8], 1'b0};
      immj = {{11{i[31]}}, i[31], i[19:12], i[20], i[30:21], 1'b0};
      immu = {i[31:12], 12'h000};
      s.pc = pc; s.inst = i; s.rd = i[11:7]; s.rd_we = 0; s.is_load = 0; s.redirect = 0;
      res = 0;
      nxt = pc + 4;
      case (i[6:0])
        7'b0110011, 7'b0010011: begin
          logic [31:0] op2;
          bit regop;
          regop = (i[6:0] == 7'b0110011);
          op2   = regop ? b : immi;
          case (f3)
            3'b000: res = (regop && i[30]) ? a - op2 : a + op2;
            3'b001: res = a << op2[4:0];
            3'b010: res = ($signed(a) < $signed(op2)) ? 1 : 0;
            3'b011: res = (a < op2) ? 1 : 0;
            3'b100: res = a ^ op2;
            3'b101: res = i[30] ? 32'($signed(a) >>> op2[4:0]) : a >> op2[4:0];
            3'b110: res = a | op2;
            3'b111: res = a & op2;
          endcase
          s.rd_we = 1;
        end
        7'b0000011: begin
          ea = a + immi;
          case (f3)
            3'b000: res = {{24{rd8(ea)[7]}}, rd8(ea)};
            3'b001: res = {{16{rd8(ea+1)[7]}}, rd8(ea+1), rd8(ea)};
            3'b100: res = {24'h0, rd8(ea)};
            3'b101: res = {16'h0, rd8(ea+1), rd8(ea)};
            default: res = {rd8(ea+3), rd8(ea+2), rd8(ea+1), rd8(ea)};
          endcase
          s.rd_we = 1; s.is_load = 1;
        end
        7'b0100011: begin
          ea = a + imms;
          wr8(ea, b[7:0]);
          if (f3 != 3'b000) wr8(ea + 1, b[15:8]);
          if (f3 == 3'b010) begin wr8(ea + 2, b[23:16]); wr8(ea + 3, b[31:24]); end
        end
        7'b1100011: begin
          bit t;
          case (f3)
            3'b000: t = (a == b);
            3'b001: t = (a != b);
            3'b100: t = ($signed(a) <  $signed(b));
            3'b101: t = ($signed(a) >= $signed(b));
            3'b110: t = (a <  b);
            3'b111: t = (a >= b);
            default: t = 0;
          endcase
          if (t) begin nxt = pc + immb; s.redirect = 1; end
        end
        7'b1101111: begin res = pc + 4; s.rd_we = 1; nxt = pc + immj; s.redirect = 1; end
        7'b1100111: begin res = pc + 4; s.rd_we = 1; nxt = (a + immi) & ~32'h1; s.redirect = 1; end
        7'b0110111: begin res = immu;      s.rd_we = 1; end
        7'b0010111: begin res = pc + immu; s.rd_we = 1; end
        default: ;
      endcase
      if (s.rd == 0) s.rd_we = 0;
      if (s.rd_we) x[s.rd] = res;
      s.rd_data  = res;
      pc = nxt;
      return s;
    endfunction
  endclass

  // ------------------------------------------------------ program generator
  // Registers x1..x6 carry data (few, so dependences are frequent), x8 holds
  // the data base address, x9 is a scratch address register and x10 holds
  // the auipc result of a jalr.
  localparam int DATA_BASE = 32'h100;

  function automatic int rreg();
    return 1 + int'($urandom_range(0, 5));
  endfunction

  // Builds a random program of roughly n instructions into prog, starting
  // with an initialisation block and ending with a self-loop (jal x0, 0).
  function automatic void gen_program(int n, ref logic [31:0] prog[$]);
    prog.delete();
    prog.push_back(LUI(8, 0));
    prog.push_back(ADDI(8, 0, DATA_BASE));
    for (int r = 1; r <= 6; r++) prog.push_back(ADDI(r, 0, int'($urandom_range(0, 4095)) - 2048));
    while (prog.size() < n) begin
      int k = int'($urandom_range(0, 99));
      int rd = rreg(), r1 = rreg(), r2 = rreg();
      int off = 4 * int'($urandom_range(0, 15));
      logic [2:0] f3 = 3'($urandom_range(0, 7));
      if (k < 25) begin
        logic [6:0] f7 = (f3 == 3'b000 || f3 == 3'b101) ? ($urandom_range(0, 1) ? 7'h20 : 7'h00) : 7'h00;
        prog.push_back(enc_r(f7, r2, r1, f3, rd, 7'b0110011));
      end else if (k < 40) begin
        int imm = int'($urandom_range(0, 4095)) - 2048;
        if (f3 == 3'b001) imm = int'($urandom_range(0, 31));
        if (f3 == 3'b101) imm = int'($urandom_range(0, 31)) | ($urandom_range(0, 1) ? 32'h400 : 0);
        prog.push_back(enc_i(imm, r1, f3, rd, 7'b0010011));
      end else if (k < 52) begin
        // load of random width, directly after a random gap
        logic [2:0] lf3;
        int       lo;
        case ($urandom_range(0, 4))
          0: begin lf3 = 3'b000; lo = off + int'($urandom_range(0, 3)); end
          1: begin lf3 = 3'b100; lo = off + int'($urandom_range(0, 3)); end
          2: begin lf3 = 3'b001; lo = off + 2 * int'($urandom_range(0, 1)); end
          3: begin lf3 = 3'b101; lo = off + 2 * int'($urandom_range(0, 1)); end
          default: begin lf3 = 3'b010; lo = off; end
        endcase
        prog.push_back(enc_i(lo, 8, lf3, rd, 7'b0000011));
      end else if (k < 60) begin
        logic [2:0] sf3;
        int so;
        case ($urandom_range(0, 2))
          0: begin sf3 = 3'b000; so = off + int'($urandom_range(0, 3)); end
          1: begin sf3 = 3'b001; so = off + 2 * int'($urandom_range(0, 1)); end
          default: begin sf3 = 3'b010; so = off; end
        endcase
        prog.push_back(enc_s(so, r2, 8, sf3));
      end else if (k < 66) begin
        // address computed just before use: bypass into the address path
        prog.push_back(ADDI(9, 8, off));
        prog.push_back(LW(rd, 9, 0));
      end else if (k < 70) begin
        // store right after the data is produced, then reload
        prog.push_back(ADDI(r2, r1, int'($urandom_range(0, 255))));
        prog.push_back(SW(r2, 8, off));
        prog.push_back(LW(rd, 8, off));
      end else if (k < 82) begin
        logic [2:0] bf3;
        case ($urandom_range(0, 5))
          0: bf3 = 3'b000; 1: bf3 = 3'b001; 2: bf3 = 3'b100;
          3: bf3 = 3'b101; 4: bf3 = 3'b110; default: bf3 = 3'b111;
        endcase
        prog.push_back(enc_b(4 * int'($urandom_range(1, 3)), r2, r1, bf3));
      end else if (k < 86) begin
        prog.push_back(JAL($urandom_range(0, 1) ? rd : 0, 4 * int'($urandom_range(1, 3))));
      end else if (k < 90) begin
        // two plain instructions first, so no forward branch can land
        // between the auipc and the jalr
        prog.push_back(ADD(rd, r1, r2));
        prog.push_back(SUB(r1, rd, r2));
        prog.push_back(AUIPC(10, 0));
        prog.push_back(JALR(rd, 10, 12));
        prog.push_back(ADDI(rd, rd, 1));
      end else if (k < 95) begin
        prog.push_back(LUI(rd, int'($urandom_range(0, 32'hFFFFF))));
      end else begin
        prog.push_back(AUIPC(rd, int'($urandom_range(0, 255))));
      end
    end
    // landing pad for forward branches/jumps from the last instructions
    for (int p = 0; p < 4; p++) prog.push_back(ADDI(0, 0, 0));
    prog.push_back(JAL(0, 0));
  endfunction

  // Spreads a program for a pipeline without hazard detection: every
  // instruction is followed by two no-ops, so a result is read at the
  // earliest three instructions after it is produced. pc-relative offsets of
  // branches and jal, and the jalr offset (always relative to an auipc in the
  // generated programs), are scaled by three to keep their targets.
  function automatic void spread(ref logic [31:0] prog[$]);
    logic [31:0] out[$];
    foreach (prog[k]) begin
      logic [31:0] i = prog[k];
      case (i[6:0])
        7'b1100011: begin
          int off = int'({{19{i[31]}}, i[31], i[7], i[30:25], i[11:8], 1'b0});
          i = enc_b(3 * off, int'(i[24:20]), int'(i[19:15]), i[14:12]);
        end
        7'b1101111: begin
          int off = int'({{11{i[31]}}, i[31], i[19:12], i[20], i[30:21], 1'b0});
          i = enc_j(3 * off, int'(i[11:7]));
        end
        7'b1100111: begin
          int off = int'({{20{i[31]}}, i[31:20]});
          i = enc_i(3 * off, int'(i[19:15]), i[14:12], int'(i[11:7]), i[6:0]);
        end
        default: ;
      endcase
      out.push_back(i);
      if (k != prog.size() - 1) begin
        out.push_back(ADDI(0, 0, 0));
        out.push_back(ADDI(0, 0, 0));
      end
    end
    prog = out;
  endfunction

endpackage
