// mips: single-cycle MIPS processor core.
//
// Joins the controller and the datapath. One instruction is fetched, decoded,
// executed and written back per clock cycle; reset (synchronous, active high)
// sets the PC to 0. Instruction set: add, addu, sub, subu, and, or, slt, nor,
// addi, addiu, andi, ori, lui, lw, lh, sw, beq and j. Of these, andi, nor and
// lh are the additions this design is about. The instruction port and the data
// port are separate; both expect the memory to answer combinationally within
// the cycle, and a store is committed at the next rising edge.
module mips
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] pc,
  input  logic [31:0] instr,
  output logic        memwrite,
  output logic [31:0] dataaddr,
  output logic [31:0] writedata,
  input  logic [31:0] readdata
);

  logic signext, shiftl16, regwrite, regdst, alusrc, memtoreg, jump, pcsrc, lh, zero;
  alu_ctrl_t alucontrol;

  controller u_c (
    .op         (instr[31:26]),
    .funct      (instr[5:0]),
    .zero       (zero),
    .signext    (signext),
    .shiftl16   (shiftl16),
    .regwrite   (regwrite),
    .regdst     (regdst),
    .alusrc     (alusrc),
    .memwrite   (memwrite),
    .memtoreg   (memtoreg),
    .jump       (jump),
    .pcsrc      (pcsrc),
    .lh         (lh),
    .alucontrol (alucontrol)
  );

  datapath u_dp (
    .clk        (clk),
    .reset      (reset),
    .signext    (signext),
    .shiftl16   (shiftl16),
    .regwrite   (regwrite),
    .regdst     (regdst),
    .alusrc     (alusrc),
    .memtoreg   (memtoreg),
    .jump       (jump),
    .pcsrc      (pcsrc),
    .lh         (lh),
    .alucontrol (alucontrol),
    .zero       (zero),
    .pc         (pc),
    .instr      (instr),
    .aluout     (dataaddr),
    .writedata  (writedata),
    .readdata   (readdata)
  );

endmodule
