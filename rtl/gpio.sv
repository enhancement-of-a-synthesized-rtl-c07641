// gpio: memory-mapped seven-segment display registers.
//
// Eight 7-bit registers drive the displays HEX0..HEX7 directly (segment g is
// bit 6, segment a bit 0, active low as on the board: 0x40 shows "0"). HEXi
// lives at byte offset 0x10 + 4*i of the GPIO page; a store with cs and we
// high writes bits [6:0] of wdata at the rising edge. Software therefore
// sends segment patterns, not digits. Reads return the addressed register,
// zero-extended, combinationally; other offsets read zero. Reset (synchronous,
// active high) blanks all displays (0x7F). The offsets come from the display
// program; read-back and the reset value are this design's choices.
module gpio
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        cs,
  input  logic        we,
  input  logic [11:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic [6:0]  hex [NUM_HEX]
);

  logic [11:0] ofs;
  logic        hit;
  logic [2:0]  idx;

  assign ofs = addr - GPIO_HEX0_OFS;
  assign hit = (addr >= GPIO_HEX0_OFS) && (ofs[11:2] < 10'(NUM_HEX));
  assign idx = ofs[4:2];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < NUM_HEX; i++) hex[i] <= 7'h7F;
    end else if (cs && we && hit) begin
      hex[idx] <= wdata[6:0];
    end
  end

  assign rdata = hit ? {25'b0, hex[idx]} : 32'b0;

endmodule
