// immext: immediate extender of the MIPS datapath.
//
// Combinational. shiftl16 places the 16-bit immediate in the upper half with
// zeros below (lui). Otherwise signext selects sign extension (addi, addiu,
// lw, lh, sw, beq) or zero extension (andi, ori). The two control signals are
// those of the design's control word; the extender itself is the simplest
// circuit that does what they name.
module immext (
  input  logic [15:0] imm,
  input  logic        signext,
  input  logic        shiftl16,
  output logic [31:0] immx
);

  always_comb begin
    if (shiftl16)     immx = {imm, 16'h0000};
    else if (signext) immx = {{16{imm[15]}}, imm};
    else              immx = {16'h0000, imm};
  end

endmodule
