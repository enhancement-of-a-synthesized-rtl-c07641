// addr_decoder: data-address decoder of the board system.
//
// Combinational. Addresses 0xFFFF2000..0xFFFF2FFF select the GPIO block
// (cs_gpio); every other address selects the memory (cs_mem), which uses only
// the low address bits. The GPIO page is read from the display program, which
// stores its seven-segment patterns at 0xFFFF2010..0xFFFF202C; the 4 KB page
// size and sending all other addresses to memory are this design's choices
// (the load-half test uses data addresses such as 0xA5A52008, which must reach
// memory).
module addr_decoder
  import mips_pkg::*;
(
  input  logic [31:0] addr,
  output logic        cs_mem,
  output logic        cs_gpio
);

  assign cs_gpio = (addr[31:12] == GPIO_PAGE);
  assign cs_mem  = ~cs_gpio;

endmodule
