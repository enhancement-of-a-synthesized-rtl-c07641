// alu: 32-bit ALU of the single-cycle MIPS core.
//
// Combinational. The three-bit control selects and (000), or (001), add (010),
// nor (011), subtract (110) or set-on-less-than (111, signed compare, result
// 0 or 1). zero is high when the result is all zeros and drives beq. NOR is the
// operation added to the original ALU in the code 3'b011; the remaining codes
// 3'b100 and 3'b101 are unused and give zero. Overflow is not detected: add and
// addu behave alike, as the decoder comments of the design say.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_ctrl_t   alucontrol,
  output logic [31:0] result,
  output logic        zero
);

  always_comb begin
    case (alucontrol)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_NOR: result = ~(a | b);
      ALU_SUB: result = a - b;
      ALU_SLT: result = {31'b0, $signed(a) < $signed(b)};
      default: result = '0;
    endcase
  end

  assign zero = (result == '0);

endmodule
