// mips_de2: single-cycle MIPS system for a DE2-class FPGA board.
//
// The MIPS core fetches from port A of a unified 8 KB memory and performs
// loads and stores through port B, or through the GPIO block when the address
// decoder sees the GPIO page (0xFFFF2xxx). The GPIO block holds the patterns
// of the eight seven-segment displays HEX0..HEX7. pc and instr are brought out
// for observation with an on-chip logic analyser.
//
// By default the memory is loaded with rtl/id_display.hex, the 18-instruction
// program that writes the segment patterns of "00917785" to HEX7..HEX0 and
// then loops. clk is the processor clock (the design reached 25 MHz on the
// board); reset is synchronous and active high. Memory indices use address
// bits [MEM_AW+1:2], so data addresses alias modulo the memory size.
module mips_de2
  import mips_pkg::*;
#(
  parameter int unsigned MEM_AW    = 11,
  parameter string       INIT_FILE = "rtl/id_display.hex"
) (
  input  logic        clk,
  input  logic        reset,
  output logic [6:0]  HEX0,
  output logic [6:0]  HEX1,
  output logic [6:0]  HEX2,
  output logic [6:0]  HEX3,
  output logic [6:0]  HEX4,
  output logic [6:0]  HEX5,
  output logic [6:0]  HEX6,
  output logic [6:0]  HEX7,
  output logic [31:0] pc,
  output logic [31:0] instr
);

  logic        memwrite, cs_mem, cs_gpio;
  logic [31:0] dataaddr, writedata, readdata, mem_q, gpio_q;
  logic [6:0]  hex [NUM_HEX];

  mips u_cpu (
    .clk       (clk),
    .reset     (reset),
    .pc        (pc),
    .instr     (instr),
    .memwrite  (memwrite),
    .dataaddr  (dataaddr),
    .writedata (writedata),
    .readdata  (readdata)
  );

  addr_decoder u_dec (
    .addr    (dataaddr),
    .cs_mem  (cs_mem),
    .cs_gpio (cs_gpio)
  );

  ram2port #(.AW(MEM_AW), .INIT_FILE(INIT_FILE)) u_mem (
    .clk    (clk),
    .addr_a (pc[MEM_AW+1:2]),
    .q_a    (instr),
    .addr_b (dataaddr[MEM_AW+1:2]),
    .we_b   (memwrite & cs_mem),
    .d_b    (writedata),
    .q_b    (mem_q)
  );

  gpio u_gpio (
    .clk   (clk),
    .reset (reset),
    .cs    (cs_gpio),
    .we    (memwrite),
    .addr  (dataaddr[11:0]),
    .wdata (writedata),
    .rdata (gpio_q),
    .hex   (hex)
  );

  assign readdata = cs_gpio ? gpio_q : mem_q;

  assign {HEX7, HEX6, HEX5, HEX4, HEX3, HEX2, HEX1, HEX0} =
         {hex[7], hex[6], hex[5], hex[4], hex[3], hex[2], hex[1], hex[0]};

endmodule
