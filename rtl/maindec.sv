// maindec: main decoder of the single-cycle MIPS core.
//
// Purely combinational. It maps the six-bit opcode to the twelve-bit control
// word {signext, shiftl16, regwrite, regdst, alusrc, branch, memwrite,
// memtoreg, jump, aluop} and to the separate lh signal that tells the
// load-half unit to select and sign-extend a half word.
//
// The control values for R-type, lw, sw, beq, addi/addiu, andi, ori, lui and j
// are those of the enhanced decoder; andi zero-extends its immediate and asks
// the ALU for AND (aluop 3'b011). lh (opcode 100001) uses the lw control word
// plus lh = 1, which is this design's reading: the text adds "a newly added
// control signal" without printing its decoder entry. An unknown opcode
// yields an all-zero word (no register or memory write), where the original
// left the value undefined.
module maindec
  import mips_pkg::*;
(
  input  logic [5:0] op,
  output ctrl_t      ctrl,
  output logic       lh
);

  always_comb begin
    lh = 1'b0;
    case (op)
      OP_RTYPE:          ctrl = 12'b001100000100;
      OP_LW:             ctrl = 12'b101010010000;
      OP_LH: begin
                         ctrl = 12'b101010010000;
                         lh   = 1'b1;
      end
      OP_SW:             ctrl = 12'b100010100000;
      OP_BEQ:            ctrl = 12'b100001000001;
      OP_ADDI, OP_ADDIU: ctrl = 12'b101010000000;
      OP_ANDI:           ctrl = 12'b001010000011;
      OP_ORI:            ctrl = 12'b001010000010;
      OP_LUI:            ctrl = 12'b011010000000;
      OP_J:              ctrl = 12'b000000001000;
      default:           ctrl = '0;
    endcase
  end

endmodule
