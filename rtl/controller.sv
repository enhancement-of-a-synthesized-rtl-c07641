// controller: control unit of the single-cycle MIPS core.
//
// Combinational. It joins the main decoder and the ALU decoder and forms the
// branch select pcsrc = branch & zero, where zero comes from the ALU in the
// same cycle. The outputs are the unpacked control fields the datapath uses.
// The split into main and ALU decoder follows the described design; the
// separate pcsrc gate is the usual single-cycle arrangement.
module controller
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  input  logic       zero,
  output logic       signext,
  output logic       shiftl16,
  output logic       regwrite,
  output logic       regdst,
  output logic       alusrc,
  output logic       memwrite,
  output logic       memtoreg,
  output logic       jump,
  output logic       pcsrc,
  output logic       lh,
  output alu_ctrl_t  alucontrol
);

  ctrl_t ctrl;

  maindec u_maindec (.op(op), .ctrl(ctrl), .lh(lh));
  aludec  u_aludec  (.funct(funct), .aluop(ctrl.aluop), .alucontrol(alucontrol));

  assign signext  = ctrl.signext;
  assign shiftl16 = ctrl.shiftl16;
  assign regwrite = ctrl.regwrite;
  assign regdst   = ctrl.regdst;
  assign alusrc   = ctrl.alusrc;
  assign memwrite = ctrl.memwrite;
  assign memtoreg = ctrl.memtoreg;
  assign jump     = ctrl.jump;
  assign pcsrc    = ctrl.branch & zero;

endmodule
