// datapath: single-cycle MIPS datapath.
//
// Every instruction completes in one clock cycle. The program counter is the
// only state besides the register file; it resets to 0 and on each rising
// edge takes PC+4, the beq target PC+4+(imm<<2), or the j target
// {PC+4[31:28], instr[25:0], 00}. Operand A is register rs, operand B register
// rt or the extended immediate (immext). The register written is rt or rd.
// The write-back value is the ALU result or the memory read data, passed
// through the load-half unit (lhw), which for lh keeps one half-word and
// sign-extends it; it is placed after the result multiplexer, where its output
// tracks the ALU result for every non-load instruction.
//
// The half chosen by lh is set by bit 1 of the effective address (aluout[1]):
// offset 0 of a word gives the lower half, offset 2 the upper half
// (little-endian halves). The text only says the half is chosen "based on the
// instruction"; this reading matches both of its worked cases (lower half at
// offset 0, upper half at offset 0xB). Memory reads and writes happen in the
// same cycle as the instruction fetch (asynchronous memory reads).
module datapath
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  // control
  input  logic        signext,
  input  logic        shiftl16,
  input  logic        regwrite,
  input  logic        regdst,
  input  logic        alusrc,
  input  logic        memtoreg,
  input  logic        jump,
  input  logic        pcsrc,
  input  logic        lh,
  input  alu_ctrl_t   alucontrol,
  output logic        zero,
  // instruction memory
  output logic [31:0] pc,
  input  logic [31:0] instr,
  // data memory
  output logic [31:0] aluout,
  output logic [31:0] writedata,
  input  logic [31:0] readdata
);

  logic [31:0] pcnext, pcplus4, pcbranch, pcjump;
  logic [31:0] immx, srca, srcb, result, memhw;
  logic [4:0]  writereg;

  // program counter
  always_ff @(posedge clk) begin
    if (reset) pc <= 32'h0000_0000;
    else       pc <= pcnext;
  end

  assign pcplus4  = pc + 32'd4;
  assign pcbranch = pcplus4 + {immx[29:0], 2'b00};
  assign pcjump   = {pcplus4[31:28], instr[25:0], 2'b00};
  assign pcnext   = jump ? pcjump : (pcsrc ? pcbranch : pcplus4);

  // register file
  assign writereg = regdst ? instr[15:11] : instr[20:16];

  regfile u_rf (
    .clk (clk),
    .we3 (regwrite),
    .ra1 (instr[25:21]),
    .ra2 (instr[20:16]),
    .wa3 (writereg),
    .wd3 (memhw),
    .rd1 (srca),
    .rd2 (writedata)
  );

  // immediate and ALU
  immext u_immext (
    .imm      (instr[15:0]),
    .signext  (signext),
    .shiftl16 (shiftl16),
    .immx     (immx)
  );

  assign srcb = alusrc ? immx : writedata;

  alu u_alu (
    .a          (srca),
    .b          (srcb),
    .alucontrol (alucontrol),
    .result     (aluout),
    .zero       (zero)
  );

  // write-back
  assign result = memtoreg ? readdata : aluout;

  lhw u_lhw (
    .fword     (result),
    .lh        (lh),
    .lhcontrol (aluout[1]),
    .memhw     (memhw)
  );

endmodule
