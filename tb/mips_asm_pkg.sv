// mips_asm_pkg: test helpers for the MIPS testbenches.
//
// Instruction encoders (a tiny assembler) for the instructions the core
// implements, and an instruction-set reference model written from the MIPS
// instruction definitions, independent of the RTL: ref_step() executes one
// instruction on a reference state (registers, PC, word memory of 2**AW
// words indexed by address bits [AW+1:2], seven-segment registers at
// 0xFFFF2010 + 4*i). The testbenches compare the RTL against it cycle by cycle.
package mips_asm_pkg;

  // ---------------- encoders ----------------
  function automatic logic [31:0] rtype(input logic [5:0] funct, input int rd, input int rs, input int rt);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'b00000, funct};
  endfunction
  function automatic logic [31:0] itype(input logic [5:0] op, input int rt, input int rs, input logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction

  function automatic logic [31:0] a_add (int rd, int rs, int rt); return rtype(6'h20, rd, rs, rt); endfunction
  function automatic logic [31:0] a_addu(int rd, int rs, int rt); return rtype(6'h21, rd, rs, rt); endfunction
  function automatic logic [31:0] a_sub (int rd, int rs, int rt); return rtype(6'h22, rd, rs, rt); endfunction
  function automatic logic [31:0] a_subu(int rd, int rs, int rt); return rtype(6'h23, rd, rs, rt); endfunction
  function automatic logic [31:0] a_and (int rd, int rs, int rt); return rtype(6'h24, rd, rs, rt); endfunction
  function automatic logic [31:0] a_or  (int rd, int rs, int rt); return rtype(6'h25, rd, rs, rt); endfunction
  function automatic logic [31:0] a_nor (int rd, int rs, int rt); return rtype(6'h27, rd, rs, rt); endfunction
  function automatic logic [31:0] a_slt (int rd, int rs, int rt); return rtype(6'h2A, rd, rs, rt); endfunction
  function automatic logic [31:0] a_addi (int rt, int rs, logic [15:0] imm); return itype(6'h08, rt, rs, imm); endfunction
  function automatic logic [31:0] a_addiu(int rt, int rs, logic [15:0] imm); return itype(6'h09, rt, rs, imm); endfunction
  function automatic logic [31:0] a_andi (int rt, int rs, logic [15:0] imm); return itype(6'h0C, rt, rs, imm); endfunction
  function automatic logic [31:0] a_ori  (int rt, int rs, logic [15:0] imm); return itype(6'h0D, rt, rs, imm); endfunction
  function automatic logic [31:0] a_lui  (int rt, logic [15:0] imm);         return itype(6'h0F, rt, 0, imm); endfunction
  function automatic logic [31:0] a_lw   (int rt, logic [15:0] imm, int rs); return itype(6'h23, rt, rs, imm); endfunction
  function automatic logic [31:0] a_lh   (int rt, logic [15:0] imm, int rs); return itype(6'h21, rt, rs, imm); endfunction
  function automatic logic [31:0] a_sw   (int rt, logic [15:0] imm, int rs); return itype(6'h2B, rt, rs, imm); endfunction
  function automatic logic [31:0] a_beq  (int rs, int rt, logic [15:0] off); return itype(6'h04, rt, rs, off); endfunction
  function automatic logic [31:0] a_j    (logic [31:0] target);              return {6'h02, target[27:2]}; endfunction

  // ---------------- reference model ----------------
  localparam int REF_AW = 11;

  typedef struct {
    logic [31:0] r [32];
    logic [31:0] pc;
    logic [31:0] mem [2**REF_AW];
    logic [6:0]  hex [8];
  } ref_t;

  function automatic logic [31:0] sx16(input logic [15:0] v); return {{16{v[15]}}, v}; endfunction
  function automatic logic [31:0] zx16(input logic [15:0] v); return {16'h0, v}; endfunction

  function automatic bit is_gpio(input logic [31:0] a); return a[31:12] == 20'hFFFF2; endfunction

  function automatic logic [31:0] ref_load(input ref_t s, input logic [31:0] a);
    int k;
    if (is_gpio(a)) begin
      k = (int'(a[11:0]) - 16) / 4;
      if (a[11:0] >= 12'h010 && k < 8) return {25'b0, s.hex[k]};
      return 32'h0;
    end
    return s.mem[a[REF_AW+1:2]];
  endfunction

  // Executes the instruction at s.pc. Returns 1 for a store, with its address and data.
  function automatic bit ref_step(ref ref_t s, output logic [31:0] st_addr, output logic [31:0] st_data);
    logic [31:0] in, a, b, npc, w, ea;
    logic [5:0]  op, fn;
    logic [15:0] imm;
    int          rs, rt, rd, wr;
    bit          st;
    in  = s.mem[s.pc[REF_AW+1:2]];
    op  = in[31:26]; fn = in[5:0]; imm = in[15:0];
    rs  = int'(in[25:21]); rt = int'(in[20:16]); rd = int'(in[15:11]);
    a   = (rs == 0) ? 0 : s.r[rs];
    b   = (rt == 0) ? 0 : s.r[rt];
    npc = s.pc + 4;
    wr  = -1; w = 0; st = 0; st_addr = 0; st_data = 0;
    ea  = a + sx16(imm);
    case (op)
      6'h00: begin
        wr = rd;
        case (fn)
          6'h20, 6'h21: w = a + b;
          6'h22, 6'h23: w = a - b;
          6'h24: w = a & b;
          6'h25: w = a | b;
          6'h27: w = ~(a | b);
          6'h2A: w = ($signed(a) < $signed(b)) ? 1 : 0;
          default: w = a + b;
        endcase
      end
      6'h08, 6'h09: begin wr = rt; w = a + sx16(imm); end
      6'h0C: begin wr = rt; w = a & zx16(imm); end
      6'h0D: begin wr = rt; w = a | zx16(imm); end
      6'h0F: begin wr = rt; w = {imm, 16'h0}; end
      6'h23: begin wr = rt; w = ref_load(s, ea); end
      6'h21: begin
        wr = rt; w = ref_load(s, ea);
        w  = ea[1] ? sx16(w[31:16]) : sx16(w[15:0]);
      end
      6'h2B: begin st = 1; st_addr = ea; st_data = b; end
      6'h04: if (a == b) npc = s.pc + 4 + (sx16(imm) << 2);
      6'h02: npc = {npc[31:28], in[25:0], 2'b00};
      default: ;
    endcase
    if (wr > 0) s.r[wr] = w;
    if (st) begin
      if (is_gpio(st_addr)) begin
        if (st_addr[11:0] >= 12'h010 && st_addr[11:0] < 12'h030) s.hex[(int'(st_addr[11:0]) - 16) / 4] = st_data[6:0];
      end else s.mem[st_addr[REF_AW+1:2]] = st_data;
    end
    s.pc = npc;
    return st;
  endfunction


  // ---------------- test program ----------------
  // Byte address of the data area used by the test program (word index 0x780).
  localparam logic [31:0] DATA_BASE = 32'h0000_1E00;

  // Loads the test program at word 0. It repeats the andi, nor and load-half
  // experiments with the same operand values, runs a counted loop (beq not
  // taken, beq taken, j), exercises the other ALU operations, stores every
  // result to DATA_BASE + 0x40 + 4*k and, with_gpio set, writes two
  // seven-segment registers and reads one back. It ends spinning on a
  // taken backward beq.
  function automatic void load_program(ref logic [31:0] m [2**REF_AW], input bit with_gpio);
    logic [31:0] p [$];
    p.push_back(a_lui  (2, 16'hFFFF));          // 00 andi experiment
    p.push_back(a_addiu(2, 2, 16'h3C3C));       // 04 $2 = FFFF3C3C
    p.push_back(a_andi (3, 2, 16'h5A5A));       // 08 $3 = 00001818
    p.push_back(a_lui  (4, 16'hFFFF));          // 0C nor experiment
    p.push_back(a_addiu(4, 4, 16'h5A5A));       // 10 $4 = FFFF5A5A
    p.push_back(a_nor  (5, 4, 2));              // 14 $5 = 00008181
    p.push_back(a_ori  (8, 0, 16'h1E00));       // 18 $8 = data base
    p.push_back(a_lui  (7, 16'hA5A5));          // 1C load-half experiment
    p.push_back(a_addiu(7, 7, 16'h2008));       // 20 $7 = A5A52008
    p.push_back(a_sw   (7, 16'h0000, 8));       // 24
    p.push_back(a_lw   (9, 16'h0000, 8));       // 28 $9 = A5A52008
    p.push_back(a_lh   (10, 16'h0000, 8));      // 2C $10 = 00002008 (lower half)
    p.push_back(a_addiu(11, 7, 16'h000B));      // 30 $11 = A5A52013
    p.push_back(a_sw   (11, 16'h0008, 8));      // 34
    p.push_back(a_lh   (12, 16'h000B, 8));      // 38 $12 = FFFFA5A5 (upper half)
    p.push_back(a_ori  (13, 0, 16'd5));         // 3C counter
    p.push_back(a_ori  (14, 0, 16'd0));         // 40 sum
    p.push_back(a_add  (14, 14, 13));           // 44 loop: sum += counter
    p.push_back(a_addi (13, 13, 16'hFFFF));     // 48 counter--
    p.push_back(a_beq  (13, 0, 16'd1));         // 4C exit when zero
    p.push_back(a_j    (32'h44));               // 50
    p.push_back(a_slt  (15, 5, 4));             // 54 $15 = 0
    p.push_back(a_slt  (16, 4, 5));             // 58 $16 = 1
    p.push_back(a_sub  (17, 3, 5));             // 5C
    p.push_back(a_or   (18, 3, 5));             // 60
    p.push_back(a_and  (19, 2, 4));             // 64
    p.push_back(a_subu (20, 5, 3));             // 68
    p.push_back(a_addu (21, 2, 4));             // 6C
    for (int r = 2; r <= 21; r++)
      if (r != 6 && r != 8) p.push_back(a_sw(r, 16'(16'h40 + 4 * r), 8));
    p.push_back(a_lw   (22, 16'h0050, 8));      // $22 = $4 from memory
    p.push_back(a_beq  (22, 4, 16'd0));         // taken, offset 0
    if (with_gpio) begin
      p.push_back(a_lui  (23, 16'hFFFF));
      p.push_back(a_ori  (23, 23, 16'h2010));   // $23 = HEX0 address
      p.push_back(a_ori  (24, 0, 16'h0040));    // pattern of "0"
      p.push_back(a_sw   (24, 16'h001C, 23));   // HEX7
      p.push_back(a_ori  (25, 0, 16'h0012));    // pattern of "5"
      p.push_back(a_sw   (25, 16'h0000, 23));   // HEX0
      p.push_back(a_lw   (26, 16'h001C, 23));   // read HEX7 back
      p.push_back(a_sw   (26, 16'h00C0, 8));
    end
    p.push_back(a_beq  (0, 0, 16'hFFFF));       // spin
    for (int i = 0; i < 2**REF_AW; i++) m[i] = (i < p.size()) ? p[i] : 32'h0;
  endfunction

endpackage
