// mips_pkg: constants and types shared by the single-cycle MIPS core and its
// board-level system.
//
// The control word follows the twelve-bit layout of the enhanced main decoder:
// {signext, shiftl16, regwrite, regdst, alusrc, branch, memwrite, memtoreg,
// jump, aluop[2:0]}. The ALU control codes are the three-bit codes of the ALU
// decoder, with the formerly unused code 3'b011 given to NOR. Opcode and
// function-code values are the standard MIPS32 encodings. The GPIO base address
// and the seven-segment register offsets are this design's reading of the
// display program (stores to 0xFFFF2010..0xFFFF202C).
package mips_pkg;

  // Primary opcodes (instr[31:26])
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_J     = 6'b000010;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_ADDI  = 6'b001000;
  localparam logic [5:0] OP_ADDIU = 6'b001001;
  localparam logic [5:0] OP_ANDI  = 6'b001100;
  localparam logic [5:0] OP_ORI   = 6'b001101;
  localparam logic [5:0] OP_LUI   = 6'b001111;
  localparam logic [5:0] OP_LH    = 6'b100001;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;

  // R-type function codes (instr[5:0])
  localparam logic [5:0] FN_ADD  = 6'b100000;
  localparam logic [5:0] FN_ADDU = 6'b100001;
  localparam logic [5:0] FN_SUB  = 6'b100010;
  localparam logic [5:0] FN_SUBU = 6'b100011;
  localparam logic [5:0] FN_AND  = 6'b100100;
  localparam logic [5:0] FN_OR   = 6'b100101;
  localparam logic [5:0] FN_NOR  = 6'b100111;
  localparam logic [5:0] FN_SLT  = 6'b101010;

  // aluop from the main decoder: 3'b1xx means "look at funct"
  localparam logic [2:0] AOP_ADD   = 3'b000;
  localparam logic [2:0] AOP_SUB   = 3'b001;
  localparam logic [2:0] AOP_OR    = 3'b010;
  localparam logic [2:0] AOP_AND   = 3'b011;
  localparam logic [2:0] AOP_FUNCT = 3'b100;

  // ALU control codes
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_NOR = 3'b011,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctrl_t;

  // Twelve-bit control word, most significant field first
  typedef struct packed {
    logic       signext;
    logic       shiftl16;
    logic       regwrite;
    logic       regdst;
    logic       alusrc;
    logic       branch;
    logic       memwrite;
    logic       memtoreg;
    logic       jump;
    logic [2:0] aluop;
  } ctrl_t;

  // Memory-mapped seven-segment display registers
  localparam logic [19:0] GPIO_PAGE     = 20'hFFFF2;  // 0xFFFF2000..0xFFFF2FFF
  localparam logic [11:0] GPIO_HEX0_OFS = 12'h010;    // HEXi at 0x010 + 4*i
  localparam int unsigned NUM_HEX       = 8;

endpackage
