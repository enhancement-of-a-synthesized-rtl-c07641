// aludec: ALU decoder of the single-cycle MIPS core.
//
// Purely combinational. aluop from the main decoder selects add (lw, sw, lh,
// addi, lui), subtract (beq), or (ori) or and (andi) directly; any aluop with
// its top bit set hands the choice to the R-type function code: add/addu,
// sub/subu, and, or, slt and nor. NOR takes the ALU code 3'b011 that the
// original decoder left unused. An unknown function code gives add, this
// design's choice where the original left it undefined.
module aludec
  import mips_pkg::*;
(
  input  logic [5:0] funct,
  input  logic [2:0] aluop,
  output alu_ctrl_t  alucontrol
);

  always_comb begin
    case (aluop)
      AOP_ADD: alucontrol = ALU_ADD;
      AOP_SUB: alucontrol = ALU_SUB;
      AOP_OR:  alucontrol = ALU_OR;
      AOP_AND: alucontrol = ALU_AND;
      default: begin
        case (funct)
          FN_ADD, FN_ADDU: alucontrol = ALU_ADD;
          FN_SUB, FN_SUBU: alucontrol = ALU_SUB;
          FN_AND:          alucontrol = ALU_AND;
          FN_OR:           alucontrol = ALU_OR;
          FN_SLT:          alucontrol = ALU_SLT;
          FN_NOR:          alucontrol = ALU_NOR;
          default:         alucontrol = ALU_ADD;
        endcase
      end
    endcase
  end

endmodule
