// lhw: load-half-word unit.
//
// Combinational, placed after the memory/ALU result multiplexer in front of
// the register-file write port. With lh high it returns one half of the word,
// sign-extended from that half's top bit: the lower half [15:0] when
// lhcontrol is low, the upper half [31:16] when lhcontrol is high. With lh low
// the word passes unchanged, so every other instruction writes back as before.
// This follows the described module. Which half is taken is set by the datapath
// from bit 1 of the effective address (the datapath's choice, see there).
module lhw (
  input  logic [31:0] fword,      // full word
  input  logic        lh,         // load-half instruction
  input  logic        lhcontrol,  // 1: upper half, 0: lower half
  output logic [31:0] memhw       // value written back
);

  always_comb begin
    if (lh && lhcontrol)  memhw = {{16{fword[31]}}, fword[31:16]};
    else if (lh)          memhw = {{16{fword[15]}}, fword[15:0]};
    else                  memhw = fword;
  end

endmodule
